// abs_diff: absolute difference unit of an active processing element
// (block C).
//
// Computes |s - r| of two unsigned pixels in a split form: ad is the
// difference when s >= r, otherwise its one's complement, and ad_carry is 1
// exactly when the one's complement was taken. The true value is
// ad + ad_carry; the +1 is not added here but passed on as a carry-in to the
// carry-save accumulator, which keeps a carry-propagate adder out of this
// unit. Purely combinational.
module abs_diff #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] s,        // search pixel
  input  logic [W-1:0] r,        // reference pixel
  output logic [W-1:0] ad,       // |s-r| or |s-r|-1
  output logic         ad_carry  // correction bit: |s-r| = ad + ad_carry
);
  logic [W:0] diff;

  always_comb begin
    diff     = {1'b0, s} - {1'b0, r};
    ad_carry = diff[W];                       // borrow: s < r
    ad       = diff[W] ? ~diff[W-1:0] : diff[W-1:0];
  end
endmodule
