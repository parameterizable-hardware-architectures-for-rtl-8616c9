// active_pe: active processing element, one per reference-macroblock pixel.
//
// Four parts:
//  (A) search transfer: a running search-pixel register fed, by the
//      array-wide shift command, from the right, left or lower neighbour;
//  (B) reference load: a running-data register that is part of a vertical
//      chain through which the next reference macroblock is shifted in
//      (r_shift), and a standing-data register that copies it when a new
//      macroblock starts (r_load);
//  (C) abs_diff of the search pixel and the standing reference pixel;
//  (D) csa_accumulator, adding that difference to the carry-save column
//      partial sum coming from the element below.
// (C) and (D) are combinational, so a whole column of elements adds up its
// differences within the cycle in carry-save form; the result leaves at the
// top of the column. Registers reset asynchronously (active low) to zero.
module active_pe
  import me_pkg::*;
#(
  parameter int unsigned W    = PIX_W,
  parameter int unsigned CU_W = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // (A) search transfer
  input  shift_e          shift,
  input  logic [W-1:0]    s_from_right,
  input  logic [W-1:0]    s_from_left,
  input  logic [W-1:0]    s_from_below,
  output logic [W-1:0]    s,
  // (B) reference load
  input  logic            r_shift,
  input  logic [W-1:0]    r_from_below,
  output logic [W-1:0]    r_run,
  input  logic            r_load,
  output logic [W-1:0]    r,
  // (D) carry-save partial sum, from below and to above
  input  logic [W-1:0]    acc_s_in,
  input  logic [W-2:0]    acc_cd_in,
  input  logic [CU_W-1:0] acc_cu_in,
  output logic [W-1:0]    acc_s_out,
  output logic [W-2:0]    acc_cd_out,
  output logic [CU_W-1:0] acc_cu_out
);
  logic [W-1:0] ad;
  logic         ad_carry;

  // (A)
  passive_pe #(.W(W)) u_transfer (
    .clk, .rst_n, .shift, .s_from_right, .s_from_left, .s_from_below, .s
  );

  // (B)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_run <= '0;
      r     <= '0;
    end else begin
      if (r_shift) r_run <= r_from_below;
      if (r_load)  r     <= r_run;
    end
  end

  // (C)
  abs_diff #(.W(W)) u_ad (.s, .r, .ad, .ad_carry);

  // (D)
  csa_accumulator #(.W(W), .CU_W(CU_W)) u_acc (
    .ad, .ad_carry,
    .s_in(acc_s_in), .cd_in(acc_cd_in), .cu_in(acc_cu_in),
    .s_out(acc_s_out), .cd_out(acc_cd_out), .cu_out(acc_cu_out)
  );
endmodule
