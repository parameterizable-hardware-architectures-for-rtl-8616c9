// ref_input_buffer: serial-in parallel-out buffer for the reference
// macroblock.
//
// Takes one pixel per accepted beat (in_valid && in_ready) and collects a
// line of N pixels; the first pixel of the line ends at line[0] (column 0).
// When the line is complete, full is set and in_ready drops until the
// array copies the line into its running-data registers (take). A pixel
// may arrive in the take cycle itself; it is the first of the next line
// (the array samples the old line at that clock edge).
module ref_input_buffer
  import me_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [PIX_W-1:0]       in_pix,
  output logic                   full,
  input  logic                   take,
  output logic [N-1:0][PIX_W-1:0] line
);
  logic [$clog2(N+1)-1:0] cnt;

  assign full     = (cnt == $bits(cnt)'(N));
  assign in_ready = !full || take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      line <= '0;
    end else if (in_valid && in_ready) begin
      line <= {in_pix, line[N-1:1]};
      cnt  <= (take && full) ? $bits(cnt)'(1) : cnt + 1'b1;
    end else if (take && full) begin
      cnt <= '0;
    end
  end
endmodule
