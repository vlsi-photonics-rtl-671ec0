// Line decoder for the FRAME and BUSY BIT lines (inverse of bb_encode).
//
// A transition between two consecutive line samples is a 1, no transition a 0:
// q <= d ^ d_prev on every rising clock edge. rst clears both registers.
//
// Timing: q holds the bit whose second line sample arrived one clock edge
// earlier (one cycle of latency). The NRZI code is this design's choice; the
// document names the decoder but not its code.
module bb_decode #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] d_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_prev <= '0;
      q      <= '0;
    end else begin
      d_prev <= d;
      q      <= d ^ d_prev;
    end
  end

endmodule
