// adder_tree: sums the N column partial results of the active block into
// the similarity value (SAD) of one candidate macroblock.
//
// A binary tree of log2(N) levels, 2^log2(N) - 1 two-input adders, with
// TREE_W-bit operands (16 bits for 16x16 macroblocks). When N is not a
// power of two the missing leaves are zero. The sum is registered: sad is
// valid one cycle after col_sum is presented.
module adder_tree
  import me_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned IN_W  = COL_W,
  parameter int unsigned OUT_W = TREE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][IN_W-1:0] col_sum,
  output logic [OUT_W-1:0]      sad
);
  localparam int unsigned NP = 1 << $clog2(N);   // leaves, power of two

  // node k has children 2k and 2k+1; leaves are NP..2NP-1, root is 1
  logic [OUT_W-1:0] node [1:2*NP-1];

  always_comb begin
    for (int unsigned k = 0; k < NP; k++)
      node[NP + k] = (k < N) ? OUT_W'(col_sum[k]) : '0;
    for (int unsigned k = NP - 1; k >= 1; k--)
      node[k] = node[2*k] + node[2*k + 1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sad <= '0;
    else        sad <= node[1];
  end
endmodule
