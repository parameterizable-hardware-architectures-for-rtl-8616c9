// pe_array: cylindrical New-AB2 processing array with C processing cores.
//
// N rows by L = C*Q + N - 1 columns, Q = floor(2P/C). Core c owns the
// active block at columns c*Q .. c*Q+N-1 (N x N active elements, one per
// reference pixel); it is followed by Q - N passive columns, and the last
// core by Q - N + N - 1 (for C = 1: 2P - 1). Passive elements only hold and
// displace search pixels. Every core holds its own copy of the reference
// block. C = 1 is the single-array (type I) processor; C > 1 requires
// Q >= N (type II). The right neighbour of column L-1 is column 0 and the left
// neighbour of column 0 is column L-1: the array is closed into a cylinder,
// so a horizontal shift rotates every row and no pixel is lost.
//
// Every cycle all search registers follow one shift command:
//   SH_LEFT/SH_RIGHT rotate every row by one column;
//   SH_UP moves every row up by one, drops the top row and loads line_in
//        (a search-area line, from the input buffer) into the bottom row;
//   SH_HOLD keeps the contents.
// The reference macroblock is shifted line by line into the running-data
// registers of the active block (r_shift, bottom row from r_line_in) and
// copied into the standing-data registers by r_load.
//
// In each cycle every active block compares its N x N search pixels with
// the N x N standing reference pixels; every column adds its absolute
// differences bottom to top in carry-save form. At the top of each column
// the redundant sum is resolved into a COL_W-bit binary value and
// registered: col_sum[c] holds core c's column sums of the array contents
// of the previous cycle (one cycle latency). Row 0 is the top row.
module pe_array
  import me_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter int unsigned C = 1,
  localparam int unsigned Q = (2*P) / C,        // columns per core
  localparam int unsigned L = C*Q + N - 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  shift_e                 shift,
  input  logic [L-1:0][PIX_W-1:0] line_in,
  input  logic                   r_shift,
  input  logic [N-1:0][PIX_W-1:0] r_line_in,
  input  logic                   r_load,
  output logic [C-1:0][N-1:0][COL_W-1:0] col_sum
);
  localparam int unsigned CU_W = COL_W - PIX_W;

  initial begin
    if (C < 1 || Q < N) $error("pe_array: needs C >= 1 and floor(2P/C) >= N");
  end

  // search pixel of every element, [row][column]
  logic [PIX_W-1:0] s [N][L];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < L; j++) begin : g_col
      localparam int unsigned JR = (j + 1) % L;       // right neighbour
      localparam int unsigned JL = (j + L - 1) % L;   // left neighbour
      logic [PIX_W-1:0] below;
      if (i == N - 1) begin : g_bot
        assign below = line_in[j];
      end else begin : g_mid
        assign below = s[i+1][j];
      end

      if ((j % Q) < N && (j / Q) < C) begin : g_act
        localparam int unsigned JN = j % Q;          // reference column
        logic [PIX_W-1:0] r_below;
        logic [PIX_W-1:0] r_run;   // running-data register
        logic [PIX_W-1:0] r_std;   // standing-data register
        // carry-save partial sum leaving this element upwards
        logic [PIX_W-1:0] acc_s;
        logic [PIX_W-2:0] acc_cd;
        logic [CU_W-1:0]  acc_cu;
        // and the one arriving from below
        logic [PIX_W-1:0] cs_s;
        logic [PIX_W-2:0] cs_cd;
        logic [CU_W-1:0]  cs_cu;
        if (i == N - 1) begin : g_first
          assign r_below = r_line_in[JN];
          assign cs_s  = '0;
          assign cs_cd = '0;
          assign cs_cu = '0;
        end else begin : g_next
          assign r_below = g_row[i+1].g_col[j].g_act.r_run;
          assign cs_s  = g_row[i+1].g_col[j].g_act.acc_s;
          assign cs_cd = g_row[i+1].g_col[j].g_act.acc_cd;
          assign cs_cu = g_row[i+1].g_col[j].g_act.acc_cu;
        end
        active_pe #(.W(PIX_W), .CU_W(CU_W)) u_pe (
          .clk, .rst_n, .shift,
          .s_from_right(s[i][JR]), .s_from_left(s[i][JL]), .s_from_below(below),
          .s(s[i][j]),
          .r_shift, .r_from_below(r_below), .r_run(r_run),
          .r_load, .r(r_std),
          .acc_s_in(cs_s), .acc_cd_in(cs_cd), .acc_cu_in(cs_cu),
          .acc_s_out(acc_s), .acc_cd_out(acc_cd), .acc_cu_out(acc_cu)
        );
      end else begin : g_pas
        passive_pe #(.W(PIX_W)) u_pe (
          .clk, .rst_n, .shift,
          .s_from_right(s[i][JR]), .s_from_left(s[i][JL]), .s_from_below(below),
          .s(s[i][j])
        );
      end
    end
  end

  // resolve the carry-save column sums at the upper margin and register them
  for (genvar c = 0; c < C; c++) begin : g_core
    for (genvar j = 0; j < N; j++) begin : g_top
      logic [COL_W-1:0] resolved;
      assign resolved = COL_W'(g_row[0].g_col[c*Q + j].g_act.acc_s)
                      + (COL_W'(g_row[0].g_col[c*Q + j].g_act.acc_cd) << 1)
                      + (COL_W'(g_row[0].g_col[c*Q + j].g_act.acc_cu) << PIX_W);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) col_sum[c][j] <= '0;
        else        col_sum[c][j] <= resolved;
      end
    end
  end
endmodule
