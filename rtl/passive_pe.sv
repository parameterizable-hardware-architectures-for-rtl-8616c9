// passive_pe: passive processing element.
//
// Holds one search-area pixel and only displaces it: each cycle it keeps
// its pixel, or takes the pixel of its right neighbour (array data moves
// left), of its left neighbour (data moves right) or of the element below
// (data moves up), as selected by the array-wide shift command. It is the
// search transfer circuit of the active element without the arithmetic.
// Output s is the registered pixel. Asynchronous active-low reset clears it.
module passive_pe
  import me_pkg::*;
#(
  parameter int unsigned W = PIX_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  shift_e       shift,
  input  logic [W-1:0] s_from_right,
  input  logic [W-1:0] s_from_left,
  input  logic [W-1:0] s_from_below,
  output logic [W-1:0] s
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else begin
      unique case (shift)
        SH_LEFT:  s <= s_from_right;
        SH_RIGHT: s <= s_from_left;
        SH_UP:    s <= s_from_below;
        default:  s <= s;
      endcase
    end
  end
endmodule
