// tb_ref_input_buffer: streams 16-pixel reference lines with random gaps;
// every complete line must present pixel k at line[k], hold while full,
// and accept the next line's first pixel in the take cycle.
module automatic tb_ref_input_buffer;
  import me_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, full, take;
  logic [7:0] in_pix;
  logic [N-1:0][7:0] line;
  byte unsigned px [N];
  int checks = 0, failures = 0;

  ref_input_buffer #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pix,
    .full, .take, .line);

  task automatic check(string what, bit ok);
    checks = checks + 1;
    if (!ok) begin
      failures = failures + 1;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    in_valid = 0; in_pix = '0; take = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int ln = 0; ln < 300; ln++) begin
      bit share = take;
      for (int k = 0; k < N; k++) px[k] = byte'($urandom_range(255));
      for (int k = 0; k < N; k++) begin
        if (!(k == 0 && share)) begin
          @(negedge clk);
          take = 0;
        end
        while (ln % 2 == 1 && $urandom_range(2) == 0) begin
          in_valid = 0;
          @(negedge clk);
          take = 0;
        end
        in_valid = 1;
        in_pix = px[k];
        #1 check($sformatf("line %0d pixel %0d accepted", ln, k), in_ready);
      end
      @(negedge clk);
      take = 0;
      in_valid = 0;
      #1 check($sformatf("line %0d full", ln), full && !in_ready);
      for (int k = 0; k < N; k++)
        check($sformatf("line %0d pixel %0d", ln, k), line[k] == px[k]);
      repeat ($urandom_range(3)) @(negedge clk);
      #1 check("holds while full", full);
      take = 1;
      if ($urandom_range(1) == 0) begin
        @(negedge clk);
        take = 0;
        #1 check("empty after take", !full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures = failures + 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
