// me_processor: full-search block-matching motion estimation processor
// of the New-AB2 class, by default in its single-core (type I)
// configuration.
//
// For every N x N reference macroblock it evaluates all (2P)^2 candidate
// blocks of a (2P + N - 1)^2 search area, one candidate per clock cycle,
// and reports the displacement with the smallest sum of absolute
// differences (SAD). Defaults: N = 16, P = 16, search range -15..+16.
// With C > 1 processing cores (type II; needs floor(2P/C) >= N) the array
// has C active blocks, each with its own adder tree, and C candidates are
// evaluated per cycle; the search range then becomes C*floor(2P/C)
// candidates per direction, starting at -(P-1).
//
// Data path: search input buffer (line SIPO with alignment circuit) ->
// cylindrical PE array (N x N active + N x (2P-1) passive elements for one
// core; column sums registered at the top) -> adder tree per core
// (registered) -> comparator.
// The reference macroblock enters through its own SIPO and the array's
// running-data registers while the previous macroblock is processed.
//
// Interfaces (valid/ready, a beat moves when both are high):
//   sa_*   search area, row by row, L = C*floor(2P/C) + N - 1 lines of L
//          pixels (47 at the defaults),
//          SA_PPB pixels per beat (sa_pix[0] is the leftmost);
//   ref_*  reference macroblock, row by row, N lines of N pixels, one
//          pixel per beat;
//   mv_*   result: mv_valid pulses once per macroblock with mv_x, mv_y
//          (signed, -(P-1)..P, x = column, y = row displacement) and the
//          minimum SAD in mv_sad;
//   stall  high while the array waits for the next search line.
// The first macroblock's reference data must be complete before its last
// fill line; thereafter the next reference block loads in the background.
// Latency from the last candidate to mv_valid is three cycles.
module me_processor
  import me_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned P      = 16,
  parameter int unsigned SA_PPB = 2,
  parameter int unsigned C      = 1,
  localparam int unsigned MV_W  = $clog2(P) + 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sa_valid,
  output logic                        sa_ready,
  input  logic [SA_PPB-1:0][PIX_W-1:0] sa_pix,
  input  logic                        ref_valid,
  output logic                        ref_ready,
  input  logic [PIX_W-1:0]            ref_pix,
  output logic                        mv_valid,
  output logic signed [MV_W-1:0]      mv_x,
  output logic signed [MV_W-1:0]      mv_y,
  output logic [TREE_W-1:0]           mv_sad,
  output logic                        stall     // waiting for a search line
);
  localparam int unsigned Q = (2*P) / C;     // candidates per line and core
  localparam int unsigned L = C*Q + N - 1;

  logic                         sbuf_full, sbuf_take, sbuf_misalign;
  logic [L-1:0][PIX_W-1:0]      sline;
  logic                         rbuf_full, rbuf_take;
  logic [N-1:0][PIX_W-1:0]      rline;
  shift_e                       shift;
  logic                         r_shift, r_load;
  logic [C-1:0][N-1:0][COL_W-1:0] col_sum;
  logic [C-1:0][TREE_W-1:0]     sad;
  logic [C-1:0][MV_W-1:0]       core_mv_x;

  typedef struct packed {
    logic                   valid;
    logic                   first;
    logic                   last;
    logic signed [MV_W-1:0] mv_x;
    logic signed [MV_W-1:0] mv_y;
  } cand_t;

  cand_t cand, cand_d1, cand_d2;

  search_input_buffer #(.N(N), .P(P), .PPB(SA_PPB), .C(C)) u_sbuf (
    .clk, .rst_n, .misalign(sbuf_misalign),
    .in_valid(sa_valid), .in_ready(sa_ready), .in_pix(sa_pix),
    .full(sbuf_full), .take(sbuf_take), .line(sline)
  );

  ref_input_buffer #(.N(N)) u_rbuf (
    .clk, .rst_n,
    .in_valid(ref_valid), .in_ready(ref_ready), .in_pix(ref_pix),
    .full(rbuf_full), .take(rbuf_take), .line(rline)
  );

  me_controller #(.N(N), .P(P), .C(C), .MV_W(MV_W)) u_ctrl (
    .clk, .rst_n,
    .sbuf_full, .sbuf_take, .sbuf_misalign,
    .rbuf_full, .rbuf_take,
    .shift, .r_shift, .r_load,
    .cand_valid(cand.valid), .cand_first(cand.first), .cand_last(cand.last),
    .cand_mv_x(cand.mv_x), .cand_mv_y(cand.mv_y),
    .stall
  );

  pe_array #(.N(N), .P(P), .C(C)) u_array (
    .clk, .rst_n, .shift, .line_in(sline),
    .r_shift, .r_line_in(rline), .r_load,
    .col_sum
  );

  // one adder tree per core
  for (genvar c = 0; c < C; c++) begin : g_tree
    adder_tree #(.N(N), .IN_W(COL_W), .OUT_W(TREE_W)) u_tree (
      .clk, .rst_n, .col_sum(col_sum[c]), .sad(sad[c])
    );
    // core c evaluates the candidate c*Q columns right of core 0's
    assign core_mv_x[c] = cand_d2.mv_x + MV_W'(c * Q);
  end

  // candidate tags follow the column-sum and adder-tree registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand_d1 <= '0;
      cand_d2 <= '0;
    end else begin
      cand_d1 <= cand;
      cand_d2 <= cand_d1;
    end
  end

  comparator #(.SAD_W(TREE_W), .MV_W(MV_W), .NC(C)) u_cmp (
    .clk, .rst_n,
    .cand_valid(cand_d2.valid), .cand_first(cand_d2.first), .cand_last(cand_d2.last),
    .cand_sad(sad), .cand_mv_x(core_mv_x), .cand_mv_y(cand_d2.mv_y),
    .best_valid(mv_valid), .best_sad(mv_sad), .best_mv_x(mv_x), .best_mv_y(mv_y)
  );
endmodule
