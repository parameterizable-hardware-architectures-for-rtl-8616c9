// tb_abs_diff: exhaustive test of the absolute difference unit. For every
// pair of 8-bit pixels the split result ad + ad_carry must equal |s - r|,
// and ad_carry must be set exactly when s < r.
module automatic tb_abs_diff;
  logic [7:0] s, r, ad;
  logic       ad_carry;
  int checks = 0, failures = 0;

  abs_diff #(.W(8)) dut (.s, .r, .ad, .ad_carry);

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int expv;
        s = 8'(a);
        r = 8'(b);
        #1;
        expv = (a > b) ? a - b : b - a;
        checks = checks + 1;
        if (int'(ad) + int'(ad_carry) != expv || ad_carry != (a < b)) begin
          failures = failures + 1;
          if (failures < 10) $display("FAIL: s=%0d r=%0d ad=%0d c=%0d", a, b, ad, ad_carry);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures = failures + 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
