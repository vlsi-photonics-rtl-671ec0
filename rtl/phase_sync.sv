// Retiming register at a clock-domain boundary, with a 0/180 degree phase
// select.
//
// Data launched in one clock domain (the buffered optical input clock) is
// taken over by the internal clock. With sel_180 = 0 the data is captured
// directly on the rising internal clock edge. With sel_180 = 1 it is first
// captured on the falling edge and then moved to the rising edge, which moves
// the capture point by half a period; the host chooses whichever phase
// latches the data reliably during initialization. Either way q is valid one
// internal clock cycle after the data it holds was launched.
//
// Interface: clk (internal clock), sel_180 (static phase select), d, q.
// The selectable half-period phase shift is from the document; doing it by a
// falling-edge capture register rather than by inverting a clock is this
// design's choice.
module phase_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         sel_180,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] neg_q;

  always_ff @(negedge clk) neg_q <= d;

  always_ff @(posedge clk) q <= sel_180 ? neg_q : d;

endmodule
