// tb_pe_array: random shift commands, search lines and reference lines
// into a small cylindrical array (N = 4, P = 2, 4 x 7 elements). A model
// keeps the search, running and standing registers; every registered
// column sum must equal the sum of |search - reference| over the active
// block's column in the previous cycle. Rotations must wrap between the
// first and last columns.
module automatic tb_pe_array;
  import me_pkg::*;
  localparam int N = 4;
  localparam int P = 2;
  localparam int L = 2*P + N - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  shift_e shift;
  logic [L-1:0][7:0] line_in;
  logic [N-1:0][7:0] r_line_in;
  logic r_shift, r_load;
  logic [N-1:0][COL_W-1:0] col_sum;
  int ms [N][L], mrun [N][N], mr [N][N], nxt [N][L];
  int exp_col [N];
  int checks = 0, failures = 0, n_wrap = 0;

  pe_array #(.N(N), .P(P)) dut (.clk, .rst_n, .shift, .line_in, .r_shift,
    .r_line_in, .r_load, .col_sum);

  initial begin
    shift = SH_HOLD; line_in = '0; r_line_in = '0; r_shift = 0; r_load = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < L; j++) ms[i][j] = 0;
      for (int j = 0; j < N; j++) begin mrun[i][j] = 0; mr[i][j] = 0; end
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      // column sums of the state present in this cycle
      for (int j = 0; j < N; j++) begin
        exp_col[j] = 0;
        for (int i = 0; i < N; i++) begin
          int d = ms[i][j] - mr[i][j];
          exp_col[j] += (d < 0) ? -d : d;
        end
      end
      shift = (t < 40) ? SH_UP : shift_e'($urandom_range(3));
      for (int j = 0; j < L; j++) line_in[j] = 8'($urandom_range(255));
      for (int j = 0; j < N; j++) r_line_in[j] = 8'($urandom_range(255));
      r_shift = (t < 40) || ($urandom_range(1) == 1);
      r_load  = (t == 20) || ($urandom_range(7) == 0);
      // model update
      for (int i = 0; i < N; i++)
        for (int j = 0; j < L; j++)
          case (shift)
            SH_LEFT:  nxt[i][j] = ms[i][(j + 1) % L];
            SH_RIGHT: nxt[i][j] = ms[i][(j + L - 1) % L];
            SH_UP:    nxt[i][j] = (i == N - 1) ? int'(line_in[j]) : ms[i+1][j];
            default:  nxt[i][j] = ms[i][j];
          endcase
      if (shift == SH_LEFT || shift == SH_RIGHT) n_wrap = n_wrap + 1;
      ms = nxt;
      if (r_load) mr = mrun;
      if (r_shift)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            mrun[i][j] = (i == N - 1) ? int'(r_line_in[j]) : mrun[i+1][j];
      @(negedge clk);
      if (t > 0)
        for (int j = 0; j < N; j++) begin
          checks = checks + 1;
          if (int'(col_sum[j]) != exp_col[j]) begin
            failures = failures + 1;
            if (failures < 10) $display("FAIL: t=%0d col %0d got %0d exp %0d", t, j, col_sum[j], exp_col[j]);
          end
        end
    end
    checks = checks + 1;
    if (n_wrap == 0) failures = failures + 1;
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
