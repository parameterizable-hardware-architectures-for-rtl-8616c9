// tb_me_controller: runs the sequencer of a small processor (N = 4, P = 2)
// against buffer stand-ins whose lines become complete after random
// delays. Per macroblock it checks: N fill moves with the aligned
// topology, one standing-register load with the last of them, exactly
// (2P)^2 reported candidates in zig-zag order with their vectors, left
// rotations on even lines and right rotations on odd lines, line moves
// only on complete buffers with the misaligned topology after even lines,
// first/last flags, and that the compute phase lasts (2P)^2 cycles plus
// its stall cycles.
module automatic tb_me_controller;
  import me_pkg::*;
  localparam int N = 4;
  localparam int P = 2;
  localparam int NMB = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sbuf_full, sbuf_take, sbuf_misalign, rbuf_full, rbuf_take;
  shift_e shift;
  logic r_shift, r_load, cv, cf, cl, stall;
  logic signed [4:0] mx, my;
  int checks = 0, failures = 0;
  int s_delay, r_delay;

  me_controller #(.N(N), .P(P), .MV_W(5)) dut (.clk, .rst_n, .sbuf_full,
    .sbuf_take, .sbuf_misalign, .rbuf_full, .rbuf_take, .shift, .r_shift,
    .r_load, .cand_valid(cv), .cand_first(cf), .cand_last(cl),
    .cand_mv_x(mx), .cand_mv_y(my), .stall);

  task automatic check(string what, bit ok);
    checks = checks + 1;
    if (!ok) begin
      failures = failures + 1;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // buffer stand-ins: a line becomes complete some cycles after a take
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sbuf_full <= 0; rbuf_full <= 0; s_delay <= 3; r_delay <= 3;
    end else begin
      if (sbuf_take) begin sbuf_full <= 0; s_delay <= $urandom_range(5); end
      else if (s_delay == 0) sbuf_full <= 1;
      else s_delay <= s_delay - 1;
      if (rbuf_take) begin rbuf_full <= 0; r_delay <= $urandom_range(3); end
      else if (r_delay == 0) rbuf_full <= 1;
      else r_delay <= r_delay - 1;
    end

  int n_fill = 0, n_cand = 0, n_load = 0, n_cycles = 0, n_stall = 0, mb = 0;
  int ev, ek;   // expected next candidate: line and index within it
  bit computing = 0;
  int n_rshift = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ev = 0; ek = 0;
    while (mb < NMB) begin
      @(negedge clk);
      #1;
      if (r_shift) n_rshift = n_rshift + 1;
      check("ref take only with full buffer", !rbuf_take || rbuf_full);
      check("search take only with full buffer", !sbuf_take || sbuf_full);
      check("take moves the array up", sbuf_take == (shift == SH_UP));
      if (!computing) begin
        check("no candidate while filling", !cv);
        if (sbuf_take) begin
          check("fill uses the aligned topology until the last fill move",
                sbuf_misalign == (n_fill == N - 1));
          n_fill = n_fill + 1;
          if (r_load) n_load = n_load + 1;
          check("standing load with last fill move", r_load == (n_fill == N));
          if (n_fill == N) begin computing = 1; n_cycles = 0; n_cand = 0; n_stall = 0; ev = 0; ek = 0; end
        end else
          check("array holds while filling", shift == SH_HOLD && !r_load);
      end else begin
        n_cycles = n_cycles + 1;
        if (stall) n_stall = n_stall + 1;
        check("no r_load in compute", !r_load);
        if (cv) begin
          int ex = ((ev % 2 == 0) ? ek : 2*P-1-ek) - (P-1);
          int ey = ev - (P-1);
          check($sformatf("mb %0d cand %0d mv (%0d,%0d) exp (%0d,%0d)", mb, n_cand, mx, my, ex, ey),
                int'(mx) == ex && int'(my) == ey);
          check("first flag", cf == (n_cand == 0));
          check("last flag", cl == (n_cand == 4*P*P - 1));
          n_cand = n_cand + 1;
          if (ek < 2*P - 1) begin
            check("rotation direction", shift == ((ev % 2 == 0) ? SH_LEFT : SH_RIGHT));
            ek = ek + 1;
          end
        end
        if (ek == 2*P - 1 && ev < 2*P - 1 && shift == SH_UP) begin
          check("misaligned load after even line", sbuf_misalign == (ev % 2 == 1));
          ev = ev + 1; ek = 0;
        end
        if (cl) begin
          check($sformatf("mb %0d candidates %0d", mb, n_cand), n_cand == 4*P*P);
          check($sformatf("mb %0d cycles %0d stalls %0d", mb, n_cycles, n_stall),
                n_cycles == 4*P*P + n_stall);
          computing = 0; n_fill = 0; mb = mb + 1;
        end
      end
    end
    check("standing loads", n_load == NMB);
    check("reference lines moved", n_rshift >= NMB * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures = failures + 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
