// tb_adder_tree: random and extreme column sums into the 16-input tree;
// the registered output must equal their sum one cycle later.
module automatic tb_adder_tree;
  import me_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0][COL_W-1:0] col;
  logic [TREE_W-1:0] sad;
  int checks = 0, failures = 0;
  int expq;

  adder_tree #(.N(N)) dut (.clk, .rst_n, .col_sum(col), .sad);

  initial begin
    col = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    expq = -1;
    for (int t = 0; t < 1000; t++) begin
      int e = 0;
      for (int k = 0; k < N; k++) begin
        col[k] = (t < 3) ? 12'd4080 : 12'($urandom_range(4080));
        e += int'(col[k]);
      end
      @(negedge clk);
      checks = checks + 1;
      if (int'(sad) != e) begin
        failures = failures + 1;
        $display("FAIL: t=%0d sad=%0d exp %0d", t, sad, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures = failures + 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
