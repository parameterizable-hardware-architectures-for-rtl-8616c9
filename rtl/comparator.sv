// comparator: keeps the smallest similarity value of a reference
// macroblock and the displacement vector of that candidate.
//
// NC candidates per cycle (one per processing core) arrive with
// cand_valid; within a cycle the lowest core index counts as earliest. cand_first marks the
// first candidate of a macroblock (it replaces whatever is stored);
// otherwise a candidate replaces the stored best only when its SAD is
// strictly smaller, so among equal SADs the earliest in processing order
// wins. With cand_last the final result (including that candidate) is
// registered on best_sad/best_mv_x/best_mv_y and best_valid pulses for one
// cycle, the cycle after the last candidate.
module comparator
  import me_pkg::*;
#(
  parameter int unsigned SAD_W = TREE_W,
  parameter int unsigned MV_W  = 6,
  parameter int unsigned NC    = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cand_valid,
  input  logic                   cand_first,
  input  logic                   cand_last,
  input  logic [NC-1:0][SAD_W-1:0]       cand_sad,
  input  logic [NC-1:0][MV_W-1:0]        cand_mv_x,   // signed, per core
  input  logic signed [MV_W-1:0]         cand_mv_y,
  output logic                   best_valid,
  output logic [SAD_W-1:0]       best_sad,
  output logic signed [MV_W-1:0] best_mv_x,
  output logic signed [MV_W-1:0] best_mv_y
);
  logic [SAD_W-1:0]       min_sad;
  logic signed [MV_W-1:0] min_x, min_y;
  logic                   take;
  logic [SAD_W-1:0]       c_sad;   // best of this cycle's candidates
  logic signed [MV_W-1:0] c_x;

  always_comb begin
    c_sad = cand_sad[0];
    c_x   = cand_mv_x[0];
    for (int unsigned k = 1; k < NC; k++)
      if (cand_sad[k] < c_sad) begin
        c_sad = cand_sad[k];
        c_x   = cand_mv_x[k];
      end
  end

  assign take = cand_valid && (cand_first || c_sad < min_sad);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_sad    <= '0;
      min_x      <= '0;
      min_y      <= '0;
      best_valid <= 1'b0;
      best_sad   <= '0;
      best_mv_x  <= '0;
      best_mv_y  <= '0;
    end else begin
      best_valid <= 1'b0;
      if (take) begin
        min_sad <= c_sad;
        min_x   <= c_x;
        min_y   <= cand_mv_y;
      end
      if (cand_valid && cand_last) begin
        best_valid <= 1'b1;
        best_sad   <= take ? c_sad : min_sad;
        best_mv_x  <= take ? c_x   : min_x;
        best_mv_y  <= take ? cand_mv_y : min_y;
      end
    end
  end
endmodule
