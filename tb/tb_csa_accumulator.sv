// tb_csa_accumulator: chains 16 carry-save accumulation stages, as in one
// column of the array, feeds them random absolute differences with their
// correction bits, and checks after every stage that the redundant sum
// s + 2*cd + 256*cu equals the running total of (ad + ad_carry). Columns of
// maximal differences check that the 4-bit upper part reaches 4080.
module automatic tb_csa_accumulator;
  localparam int R = 16;
  logic [7:0] ad [R];
  logic       adc [R];
  logic [7:0] s [R+1];
  logic [6:0] cd [R+1];
  logic [3:0] cu [R+1];
  int checks = 0, failures = 0;

  assign s[0] = '0;
  assign cd[0] = '0;
  assign cu[0] = '0;

  for (genvar i = 0; i < R; i++) begin : g
    csa_accumulator #(.W(8), .CU_W(4)) u (
      .ad(ad[i]), .ad_carry(adc[i]), .s_in(s[i]), .cd_in(cd[i]), .cu_in(cu[i]),
      .s_out(s[i+1]), .cd_out(cd[i+1]), .cu_out(cu[i+1]));
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int tot = 0;
      for (int i = 0; i < R; i++) begin
        if (t < 2) begin
          ad[i] = 8'hff;  // 255 + 0: largest |difference|
          adc[i] = (t == 1) && (i % 2 == 0);
          if (adc[i]) ad[i] = 8'hfe;
        end else begin
          ad[i] = 8'($urandom_range(255));
          adc[i] = (ad[i] != 8'hff) && ($urandom_range(1) == 1);
        end
      end
      #1;
      for (int i = 0; i < R; i++) begin
        tot += int'(ad[i]) + int'(adc[i]);
        checks = checks + 1;
        if (int'(s[i+1]) + 2*int'(cd[i+1]) + 256*int'(cu[i+1]) != tot) begin
          failures = failures + 1;
          if (failures < 10) $display("FAIL: t=%0d stage %0d got %0d exp %0d", t, i,
            int'(s[i+1]) + 2*int'(cd[i+1]) + 256*int'(cu[i+1]), tot);
        end
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
