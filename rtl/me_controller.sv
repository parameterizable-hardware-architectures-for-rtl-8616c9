// me_controller: sequencer of the zig-zag processing scheme.
//
// With C cores, each line holds Q = floor(2P/C) candidates per core and there
// are PH = C*Q lines; for one core Q = PH = 2P. Per reference macroblock it
// runs two phases.
//  FILL:    the first N search lines are moved up into the array, one per
//           line delivered by the search input buffer (SH_UP, aligned
//           buffer topology). The last of them waits until the next
//           reference macroblock is complete in the running-data registers,
//           and copies it into the standing-data registers in the same cycle
//           (r_load).
//  COMPUTE: PH lines of Q candidates per core, one per core and cycle.
//           Within a line the array rotates left (even lines) or right
//           (odd lines)
//           after each candidate; after the last candidate of a line the
//           array moves up and takes the next search line from the buffer,
//           and the direction reverses. Even lines end rotated by Q - 1,
//           so the line loaded during an even line uses the misaligned
//           buffer topology. If that line is not complete yet, the array
//           holds (stall) until it is; the held candidate is reported once.
// The candidate of a cycle is the array contents in that cycle; it is
// flagged on cand_valid with the vector of core 0, mv_y = line - (P-1) and
// mv_x = rotation - (P-1); core c's candidate lies c*Q columns further
// right. With PH = 2P the range is -(P-1)..P in both directions.
// cand_first/cand_last mark the first and last candidate of a macroblock.
// With the search data available in time a macroblock takes PH*Q
// compute cycles ((2P)^2 for one core) plus the FILL phase. PH must be
// even, so that the last line ends at rotation 0.
//
// The controller also moves complete reference lines from the reference
// buffer into the running-data registers (r_shift) while fewer than N of
// them are waiting there.
module me_controller
  import me_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned P    = 16,
  parameter int unsigned C    = 1,
  parameter int unsigned MV_W = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // search input buffer
  input  logic                   sbuf_full,
  output logic                   sbuf_take,
  output logic                   sbuf_misalign,
  // reference input buffer
  input  logic                   rbuf_full,
  output logic                   rbuf_take,
  // array
  output shift_e                 shift,
  output logic                   r_shift,
  output logic                   r_load,
  // candidate under evaluation
  output logic                   cand_valid,
  output logic                   cand_first,
  output logic                   cand_last,
  output logic signed [MV_W-1:0] cand_mv_x,
  output logic signed [MV_W-1:0] cand_mv_y,
  output logic                   stall
);
  localparam int unsigned Q  = (2 * P) / C;   // candidates per line and core
  localparam int unsigned PH = C * Q;         // candidate lines
  localparam int unsigned VW = $clog2(PH);
  localparam int unsigned FW = $clog2(N + 1);

  typedef enum logic { FILL, COMPUTE } phase_e;

  initial begin
    if (PH % 2 != 0) $error("me_controller: C*floor(2P/C) must be even");
  end

  phase_e        phase;
  logic [FW-1:0] fill_cnt;   // lines moved in during FILL
  logic [VW-1:0] v;          // candidate line (vertical displacement index)
  logic [VW-1:0] h;          // candidate index within the line (per core)
  logic          dir;        // 0: rotating left, 1: rotating right
  logic          reported;   // candidate of the held state already reported
  logic [FW-1:0] r_lines;    // reference lines in the running-data registers
  logic [VW-1:0] rot;

  logic line_end, mb_end, ref_ready;

  assign rot       = dir ? VW'(Q - 1) - h : h;
  assign line_end  = (h == VW'(Q - 1));
  assign mb_end    = line_end && (v == VW'(PH - 1));
  assign ref_ready = (r_lines == FW'(N));

  // reference lines
  assign r_shift   = rbuf_full && !ref_ready;
  assign rbuf_take = r_shift;

  always_comb begin
    shift         = SH_HOLD;
    sbuf_take     = 1'b0;
    r_load        = 1'b0;
    stall         = 1'b0;
    // topology of the line being loaded: the line consumed at the end of
    // the current compute line, or, from a take on, the one after it
    sbuf_misalign = (phase == COMPUTE) && !dir;
    cand_valid    = 1'b0;
    if (phase == FILL) begin
      if (sbuf_full && (fill_cnt != FW'(N - 1) || ref_ready)) begin
        shift     = SH_UP;
        sbuf_take = 1'b1;
        r_load    = (fill_cnt == FW'(N - 1));
        sbuf_misalign = (fill_cnt == FW'(N - 1));   // next: end of line 0
      end
    end else begin
      cand_valid = !reported;
      if (!line_end)
        shift = dir ? SH_RIGHT : SH_LEFT;
      else if (!mb_end) begin
        if (sbuf_full) begin
          shift     = SH_UP;
          sbuf_take = 1'b1;
          sbuf_misalign = dir;   // next line runs in the other direction
        end else
          stall = 1'b1;
      end
    end
  end

  assign cand_first = (v == '0) && (h == '0);
  assign cand_last  = mb_end;
  assign cand_mv_x  = MV_W'($signed({1'b0, rot})) - MV_W'(P - 1);
  assign cand_mv_y  = MV_W'($signed({1'b0, v}))   - MV_W'(P - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= FILL;
      fill_cnt <= '0;
      v        <= '0;
      h        <= '0;
      dir      <= 1'b0;
      reported <= 1'b0;
      r_lines  <= '0;
    end else begin
      // reference running-data registers
      if (r_load)       r_lines <= '0;
      else if (r_shift) r_lines <= r_lines + 1'b1;

      if (phase == FILL) begin
        if (sbuf_take) begin
          if (fill_cnt == FW'(N - 1)) begin
            phase    <= COMPUTE;
            fill_cnt <= '0;
            v        <= '0;
            h        <= '0;
            dir      <= 1'b0;
            reported <= 1'b0;
          end else
            fill_cnt <= fill_cnt + 1'b1;
        end
      end else begin
        if (mb_end)
          phase <= FILL;
        else if (!line_end) begin
          h        <= h + 1'b1;
          reported <= 1'b0;
        end else if (sbuf_take) begin
          h        <= '0;
          v        <= v + 1'b1;
          dir      <= !dir;
          reported <= 1'b0;
        end else
          reported <= 1'b1;
      end
    end
  end

  // one candidate per compute cycle unless stalled
  a_no_shift_when_stalled: assert property (@(posedge clk) disable iff (!rst_n)
    stall |-> shift == SH_HOLD);
  // the buffer line is only taken when complete
  a_take_full: assert property (@(posedge clk) disable iff (!rst_n)
    sbuf_take |-> sbuf_full);
endmodule
