// tb_comparator: sequences of random candidates, with deliberate ties and
// gaps in cand_valid; the result reported after the last candidate must be
// the first candidate with the smallest SAD, one cycle after cand_last.
module automatic tb_comparator;
  import me_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cv, cf, cl, bv;
  logic [15:0] csad, bsad;
  logic signed [5:0] cx, cy, bx, by;
  int checks = 0, failures = 0;

  comparator dut (.clk, .rst_n, .cand_valid(cv), .cand_first(cf), .cand_last(cl),
    .cand_sad(csad), .cand_mv_x(cx), .cand_mv_y(cy),
    .best_valid(bv), .best_sad(bsad), .best_mv_x(bx), .best_mv_y(by));

  initial begin
    cv = 0; cf = 0; cl = 0; csad = '0; cx = '0; cy = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int blk = 0; blk < 40; blk++) begin
      int n = 1 + $urandom_range(60);
      int es = -1, ex = 0, ey = 0;
      for (int i = 0; i < n; i++) begin
        while ($urandom_range(3) == 0) begin
          cv = 0; cf = 0; cl = 0;
          @(negedge clk);
          checks = checks + 1;
          if (bv) begin failures = failures + 1; $display("FAIL: spurious result"); end
        end
        cv = 1; cf = (i == 0); cl = (i == n - 1);
        csad = 16'($urandom_range(blk % 2 ? 8 : 60000));   // small range: many ties
        cx = 6'($signed($urandom_range(31)) - 15);
        cy = 6'($signed($urandom_range(31)) - 15);
        if (es < 0 || int'(csad) < es) begin es = int'(csad); ex = int'(cx); ey = int'(cy); end
        @(negedge clk);
        checks = checks + 1;
        if (bv != (i == n - 1)) begin failures = failures + 1; $display("FAIL: valid timing"); end
      end
      cv = 0; cf = 0; cl = 0;
      checks = checks + 1;
      if (int'(bsad) != es || int'(bx) != ex || int'(by) != ey) begin
        failures = failures + 1;
        $display("FAIL: blk %0d got %0d (%0d,%0d) exp %0d (%0d,%0d)", blk, bsad, bx, by, es, ex, ey);
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
