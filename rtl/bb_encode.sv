// Line encoder for the FRAME and BUSY BIT lines, which are AC coupled.
//
// Transition (NRZI) code: the line toggles for a 1 and holds for a 0, so the
// information is carried by edges rather than by levels. One register per
// line: q <= q ^ d on every rising clock edge, cleared by rst.
//
// Timing: one clock cycle of latency. Together with bb_decode this gives the
// two cycles the document allots to encoding and decoding. The document names
// the encoder and its purpose but not its code; the NRZI code is this
// design's choice.
module bb_encode #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= q ^ d;
  end

endmodule
