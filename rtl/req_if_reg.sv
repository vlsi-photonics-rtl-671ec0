// Request interface register: the host's view of the BUSY BIT requests.
//
// One set/reset flip-flop per busy bit. The host names a bit with addr and
// pulses req_set (request that processor's BUSY BIT) or req_reset (release
// it); all other bits hold. addr must be stable while a strobe is active, and
// both strobes together are not allowed: an assertion flags it and the
// register then holds its value. rst clears every request.
//
// Timing: a strobe sampled on a rising clock edge is visible on q after that
// edge. The decoded set/reset structure, the bit addressing and the
// "not allowed" combination follow the document (its truth table prints the
// set and reset columns the other way round from its own prose; the prose,
// REQ_SET sets, is followed). Using a clocked register instead of the
// document's level-sensitive RS latches is this design's choice.
module req_if_reg #(
  parameter int unsigned N = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [$clog2(N)-1:0]  addr,
  input  logic                  req_set,
  input  logic                  req_reset,
  output logic [N-1:0]          q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else if (req_set && !req_reset) begin
      q[addr] <= 1'b1;
    end else if (req_reset && !req_set) begin
      q[addr] <= 1'b0;
    end
  end

  // The document forbids setting and resetting at once.
  a_no_set_and_reset: assert property (@(posedge clk) disable iff (rst) !(req_set && req_reset))
    else $error("req_if_reg: req_set and req_reset active together");

endmodule
