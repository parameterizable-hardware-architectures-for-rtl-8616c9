// tb_search_input_buffer: streams lines of L = 47 pixels, two per beat,
// with random gaps, into the buffer at its default size, each line in a
// random topology. When a line is complete it must sit in the array
// columns the topology promises: column k (aligned) or (k + N) mod L
// (misaligned) for pixel k. The line is taken after a random delay, at
// times together with the first beat of the next line, and the buffer
// must then fill in ceil(L/2) = 24 beats.
module automatic tb_search_input_buffer;
  import me_pkg::*;
  localparam int N = 16;
  localparam int P = 16;
  localparam int L = 2*P + N - 1;
  localparam int PPB = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic misalign, in_valid, in_ready, full, take;
  logic [PPB-1:0][7:0] in_pix;
  logic [L-1:0][7:0] line;
  int checks = 0, failures = 0;
  byte unsigned px [L];

  search_input_buffer #(.N(N), .P(P), .PPB(PPB)) dut (.clk, .rst_n, .misalign,
    .in_valid, .in_ready, .in_pix, .full, .take, .line);

  task automatic check(string what, bit ok);
    checks = checks + 1;
    if (!ok) begin
      failures = failures + 1;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    misalign = 0; in_valid = 0; in_pix = '0; take = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int ln = 0; ln < 200; ln++) begin
      int beats = 0;
      bit gaps = (ln % 3 == 2);
      bit share = take;   // take still high: first beat shares that cycle
      for (int k = 0; k < L; k++) px[k] = byte'($urandom_range(255));
      for (int x = 0; x < L; x += PPB) begin
        if (!(x == 0 && share)) begin
          @(negedge clk);
          take = 0;
        end
        while (gaps && $urandom_range(2) == 0) begin
          in_valid = 0;
          @(negedge clk);
          take = 0;
        end
        if (x == 0) misalign = (ln % 2 == 1) ^ (ln % 5 == 0);
        in_valid = 1;
        for (int q = 0; q < PPB; q++) in_pix[q] = (x + q < L) ? px[x+q] : 8'h00;
        #1 check($sformatf("line %0d beat %0d ready share %0d take %0d full %0d", ln, x, share, take, full), in_ready);
        beats++;
      end
      @(negedge clk);
      take = 0;
      in_valid = 0;
      check($sformatf("line %0d full after %0d beats", ln, beats), full && beats == (L + PPB - 1) / PPB);
      for (int k = 0; k < L; k++) begin
        int col = misalign ? (k + N) % L : k;
        check($sformatf("line %0d pixel %0d", ln, k), line[col] == px[k]);
      end
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        check("holds while full", full && !in_ready);
      end
      take = 1;   // next line's first beat may share this cycle
      if ($urandom_range(1) == 0) begin
        @(negedge clk);
        take = 0;
        check("empty after take", !full);
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
