// search_input_buffer: serial-in parallel-out buffer for one line of the
// search area, with the alignment circuit of the cylindrical array.
//
// The L = C*Q + N - 1 registers (Q = floor(2P/C) columns per core, C
// cores) are split into two shift registers: A (LA = C*Q - (Q - N)
// registers, array columns 0..LA-1) and B (LB = Q - 1 registers, array
// columns LA..L-1). For one core, LA = N and LB = 2P - 1. Two multiplexers
// choose how they are chained:
//   aligned    (misalign = 0): in -> B[LB-1] .. B[0] -> A[LA-1] .. A[0]
//   misaligned (misalign = 1): in -> A[LA-1] .. A[0] -> B[LB-1] .. B[0]
// In the aligned topology pixel k of a line ends in array column k; in the
// misaligned one it ends in column (k + LA) mod L, which is where the
// cylindrical array, after Q - 1 left rotations, expects search column k.
// The controller selects the topology for the line being loaded and keeps
// it for the whole line.
//
// The pixel port carries PPB pixels per beat, in_pix[0] first. A line
// takes ceil(L/PPB) beats; the last beat of an odd line uses only the
// pixels still needed. When all L pixels are in, full is set and in_ready
// drops until take; a beat may arrive in the take cycle itself and becomes
// the first of the next line (the array samples the old line at that edge).
// At the defaults (one core, two pixels per beat) a 47-pixel line arrives
// in 24 beats, within the 32 cycles the array spends on one line of
// candidates.
module search_input_buffer
  import me_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter int unsigned P   = 16,
  parameter int unsigned PPB = 2,
  parameter int unsigned C   = 1,
  localparam int unsigned Q  = (2*P) / C,
  localparam int unsigned L  = C*Q + N - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     misalign,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [PPB-1:0][PIX_W-1:0] in_pix,
  output logic                     full,
  input  logic                     take,
  output logic [L-1:0][PIX_W-1:0]  line
);
  localparam int unsigned LB = Q - 1;    // m + N - 1, m = Q - N
  localparam int unsigned LA = L - LB;   // C(l + m) - m
  localparam int unsigned CW = $clog2(L + 1);

  logic [PIX_W-1:0] a_q [LA];
  logic [PIX_W-1:0] b_q [LB];
  logic [PIX_W-1:0] a_d [LA];
  logic [PIX_W-1:0] b_d [LB];
  logic [CW-1:0]    cnt;
  logic [CW-1:0]    left;    // pixels still missing in this line
  logic [CW-1:0]    left_in; // the same, seen by an accepted beat

  assign full     = (cnt == CW'(L));
  assign in_ready = !full || take;
  assign left     = CW'(L) - cnt;
  // a beat accepted together with take starts the next line
  assign left_in  = (take && full) ? CW'(L) : left;

  // shift the chain once per pixel of the beat
  always_comb begin
    logic [PIX_W-1:0] a_out, b_out;
    a_d   = a_q;
    b_d   = b_q;
    a_out = '0;
    b_out = '0;
    for (int unsigned q = 0; q < PPB; q++) begin
      if (CW'(q) < left_in) begin
        a_out = a_d[0];
        b_out = b_d[0];
        for (int unsigned k = 0; k + 1 < LA; k++) a_d[k] = a_d[k+1];
        for (int unsigned k = 0; k + 1 < LB; k++) b_d[k] = b_d[k+1];
        a_d[LA-1] = misalign ? in_pix[q] : b_out;   // mux at the end of A
        b_d[LB-1] = misalign ? a_out : in_pix[q];   // mux at the end of B
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int unsigned k = 0; k < LA; k++) a_q[k] <= '0;
      for (int unsigned k = 0; k < LB; k++) b_q[k] <= '0;
    end else if (in_valid && in_ready) begin
      a_q <= a_d;
      b_q <= b_d;
      cnt <= (left_in > CW'(PPB)) ? CW'(L) - left_in + CW'(PPB) : CW'(L);
    end else if (take && full) begin
      cnt <= '0;
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < LA; k++) line[k]      = a_q[k];
    for (int unsigned k = 0; k < LB; k++) line[LA + k] = b_q[k];
  end
endmodule
