// tb_me_processor: end-to-end test of the motion estimation processor at
// its default size (N = 16, P = 16).
//
// Several macroblocks are processed back to back. For each one the bench
// generates a random search area and a reference block, in some blocks a
// copy of a random candidate with a little noise so that a clear best match
// exists. A software model evaluates every candidate in the processor's
// zig-zag order (even lines left to right, odd lines right to left, lower
// core first within a cycle, the earliest of equal SADs wins) and the
// reported vector and SAD must match.
// Search data is streamed at full rate for some macroblocks (their compute
// phase must then take exactly (2P)^2 cycles for one core) and with random
// gaps for another, which forces stalls. The steady-state macroblock period is
// checked, and at the default size compared with the 4CIF rate budget.
// Coverage counters make sure every mechanism happened: left and right
// rotations, aligned and misaligned line loads,
// fill moves, stalls, reference loading in the background, and best-match
// replacements in the comparator.
module automatic tb_me_processor;
  import me_pkg::*;

  localparam int N      = 16;
  localparam int P      = 16;
  localparam int SA_PPB = 2;
  localparam int C      = 1;
  localparam int Q      = (2*P) / C;     // candidates per line and core
  localparam int PH     = C * Q;         // candidate lines
  localparam int L      = PH + N - 1;
  localparam int MV_W   = $clog2(P) + 2;
  localparam int NMB    = 4;
  localparam int WATCHDOG = NMB * 6 * (PH*Q + N*L) + 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        sa_valid, sa_ready;
  logic [SA_PPB-1:0][PIX_W-1:0] sa_pix;
  logic                        ref_valid, ref_ready;
  logic [PIX_W-1:0]            ref_pix;
  logic                        mv_valid, stall;
  logic signed [MV_W-1:0]      mv_x, mv_y;
  logic [TREE_W-1:0]           mv_sad;

  me_processor dut (.*);

  int checks = 0, failures = 0;

  // stimulus for all macroblocks
  byte unsigned sa  [NMB][L][L];
  byte unsigned rf  [NMB][N][N];
  int           exp_sad [NMB];
  int           exp_x [NMB], exp_y [NMB];
  bit           gaps [NMB];

  function automatic int cand_sad(int m, int v, int x);
    int s = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int d = int'(sa[m][v+i][x+j]) - int'(rf[m][i][j]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  initial begin
    for (int m = 0; m < NMB; m++) begin
      int bv = $urandom_range(PH-1);
      int bx = $urandom_range(PH-1);
      if (m == 2) bx = (C-1)*Q + $urandom_range(Q-1);   // in the last core's range
      gaps[m] = (m == 1);
      for (int y = 0; y < L; y++)
        for (int x = 0; x < L; x++)
          sa[m][y][x] = byte'($urandom_range(255));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (m == 0) rf[m][i][j] = byte'($urandom_range(255));   // pure noise
          else begin
            int q = int'(sa[m][bv+i][bx+j]) + int'($urandom_range(6)) - 3;
            rf[m][i][j] = byte'((q < 0) ? 0 : (q > 255) ? 255 : q);
          end
      // reference model in processing order
      exp_sad[m] = -1;
      for (int v = 0; v < PH; v++)
        for (int k = 0; k < Q; k++)
          for (int c = 0; c < C; c++) begin
            int x = c*Q + ((v % 2 == 0) ? k : Q-1-k);
            int s = cand_sad(m, v, x);
            if (exp_sad[m] < 0 || s < exp_sad[m]) begin
              exp_sad[m] = s;
              exp_x[m] = x - (P-1);
              exp_y[m] = v - (P-1);
            end
          end
    end
  end

  // search-area stream
  initial begin
    sa_valid = 1'b0;
    sa_pix   = '0;
    @(posedge rst_n);
    for (int m = 0; m < NMB; m++)
      for (int y = 0; y < L; y++)
        for (int x = 0; x < L; x += SA_PPB) begin
          @(negedge clk);
          while (gaps[m] && $urandom_range(1) == 0) begin
            sa_valid = 1'b0;
            @(negedge clk);
          end
          sa_valid = 1'b1;
          for (int q = 0; q < SA_PPB; q++)
            sa_pix[q] = (x + q < L) ? sa[m][y][x+q] : 8'h00;
          @(posedge clk);
          while (!sa_ready) @(posedge clk);
        end
    @(negedge clk);
    sa_valid = 1'b0;
  end

  // reference stream
  initial begin
    ref_valid = 1'b0;
    ref_pix   = '0;
    @(posedge rst_n);
    for (int m = 0; m < NMB; m++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          @(negedge clk);
          ref_valid = 1'b1;
          ref_pix   = rf[m][i][j];
          @(posedge clk);
          while (!ref_ready) @(posedge clk);
        end
    @(negedge clk);
    ref_valid = 1'b0;
  end

  // coverage of mechanisms
  int n_left = 0, n_right = 0, n_up_aligned = 0, n_up_misaligned = 0;
  int n_fill = 0, n_stall = 0, n_bg_ref = 0, n_replace = 0;
  int compute_cycles [NMB];
  int stall_cycles [NMB];
  int mb_in = 0;

  // sampled on the falling edge, away from the register updates
  logic in_compute;
  assign in_compute = dut.u_ctrl.phase == 1'b1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (in_compute) begin
        if (mb_in < NMB) compute_cycles[mb_in] = compute_cycles[mb_in] + 1;
        if (stall && mb_in < NMB) stall_cycles[mb_in] = stall_cycles[mb_in] + 1;
        if (dut.shift == SH_LEFT)  n_left = n_left + 1;
        if (dut.shift == SH_RIGHT) n_right = n_right + 1;
        if (dut.shift == SH_UP && !dut.u_ctrl.dir) n_up_misaligned = n_up_misaligned + 1;
        if (dut.shift == SH_UP && dut.u_ctrl.dir)  n_up_aligned = n_up_aligned + 1;
        if (dut.r_shift) n_bg_ref = n_bg_ref + 1;
        if (dut.u_ctrl.cand_last) mb_in = mb_in + 1;
      end else if (dut.shift == SH_UP) n_fill = n_fill + 1;
      if (stall) n_stall = n_stall + 1;
      if (dut.u_cmp.take && !dut.u_cmp.cand_first) n_replace = n_replace + 1;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int mb_out = 0;
  longint t_done [NMB];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  // steady-state macroblock period at full input rate: (2P)^2 candidate
  // cycles plus a fill of N lines, the first of which was loaded during
  // the previous macroblock's last line: 1 + (N-1) * ceil(L/SA_PPB)
  localparam int PERIOD = PH*Q + 1 + (N-1) * ((L + SA_PPB - 1) / SA_PPB);
  initial begin
    for (int m = 0; m < NMB; m++) begin compute_cycles[m] = 0; stall_cycles[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (mb_out < NMB) begin
      @(posedge clk);
      if (mv_valid) begin
        check($sformatf("mb %0d sad %0d exp %0d", mb_out, mv_sad, exp_sad[mb_out]),
              int'(mv_sad) == exp_sad[mb_out]);
        check($sformatf("mb %0d mv (%0d,%0d) exp (%0d,%0d)", mb_out, mv_x, mv_y,
                        exp_x[mb_out], exp_y[mb_out]),
              int'(mv_x) == exp_x[mb_out] && int'(mv_y) == exp_y[mb_out]);
        // PH*Q candidate cycles ((2P)^2 for one core) plus any stalls
        check($sformatf("mb %0d compute cycles %0d stalls %0d", mb_out,
                        compute_cycles[mb_out], stall_cycles[mb_out]),
              compute_cycles[mb_out] == PH*Q + stall_cycles[mb_out]);
        if (!gaps[mb_out])
          check($sformatf("mb %0d full-rate input stalled", mb_out), stall_cycles[mb_out] == 0);
        t_done[mb_out] = cyc;
        mb_out++;
      end
    end
    check($sformatf("steady-state period %0d exp %0d", t_done[3] - t_done[2], PERIOD),
          t_done[3] - t_done[2] == longint'(PERIOD));
    // 4CIF (704x576, 1584 macroblocks) at 16 frames/s with a 36.5 MHz clock
    // allows 36.5e6 / (16 * 1584) = 1440 cycles per macroblock
    if (N == 16 && P == 16)
      check("4CIF at 16 frames/s and 36.5 MHz", t_done[3] - t_done[2] <= 1440);
    check("left rotations",        n_left > 0);
    check("right rotations",       n_right > 0);
    check("aligned line loads",    n_up_aligned > 0);
    check("misaligned line loads", n_up_misaligned > 0);
    check("fill moves",            n_fill == NMB * N);
    check("stalls",                n_stall > 0);
    check("background ref loads",  n_bg_ref > 0);
    check("comparator replacements", n_replace > 0);
    if (C > 1)
      check("best match found by the last core", exp_x[2] + (P-1) >= (C-1)*Q);
    $display("coverage: left=%0d right=%0d up_al=%0d up_mis=%0d fill=%0d stall=%0d bgref=%0d repl=%0d",
             n_left, n_right, n_up_aligned, n_up_misaligned, n_fill, n_stall, n_bg_ref, n_replace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
