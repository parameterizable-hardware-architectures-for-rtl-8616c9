// csa_accumulator: carry-save accumulation stage of an active processing
// element (block D).
//
// A column partial sum travels up the array in redundant form
//   value = s_acc + 2*cd_acc + 2^W * cu_acc
// with an W-bit sum vector, a (W-1)-bit carry vector and a short upper part.
// One row of full adders adds the absolute difference (ad) and the sum and
// carry vectors; the free least significant carry slot takes ad_carry, the
// correction bit of the absolute difference unit. The carry that leaves
// the top full adder has weight 2^W and is added to the upper part by an
// incrementer, so no operand grows by one bit per row. Purely
// combinational: no carry propagates across more than the incrementer.
//
// The upper part is CU_W bits wide. The default of 4 bits holds the
// 12-bit column sums of a 16-row column (at most 16 * 255 = 4080).
module csa_accumulator #(
  parameter int unsigned W    = 8,
  parameter int unsigned CU_W = 4
) (
  input  logic [W-1:0]    ad,
  input  logic            ad_carry,
  input  logic [W-1:0]    s_in,
  input  logic [W-2:0]    cd_in,
  input  logic [CU_W-1:0] cu_in,
  output logic [W-1:0]    s_out,
  output logic [W-2:0]    cd_out,
  output logic [CU_W-1:0] cu_out
);
  logic [W-1:0] c3;     // third operand: carry vector shifted in, ad_carry in slot 0
  logic [W-1:0] carry;  // full-adder carries, bit k has weight 2^(k+1)

  always_comb begin
    c3     = {cd_in, ad_carry};
    s_out  = ad ^ s_in ^ c3;
    carry  = (ad & s_in) | (ad & c3) | (s_in & c3);
    cd_out = carry[W-2:0];
    cu_out = cu_in + CU_W'(carry[W-1]);   // incrementer
  end
endmodule
