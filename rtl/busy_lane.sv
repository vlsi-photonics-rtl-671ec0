// One serial BUSY BIT channel of a node: request register, grab register and
// the BUSY_OUT logic.
//
// The busy bits of N processors travel serially behind the rising edge of
// FRAME, the bit of processor N-1 first. While FRAME is low the request
// register copies the request interface register on every clock. While FRAME
// is high the request register and the grab register shift one place per
// clock toward index N-1 (a 0 enters the request register at index 0), so the
// bits at index N-1 always belong to the busy bit currently on the line:
//
//   REQUEST  = req_q[N-1]
//   BUSY_OUT = REQUEST | (BUSY_IN & ~GRAB)          GRAB = grab_q[N-1]
//   new grab = REQUEST & (~BUSY_IN | GRAB)          shifted into grab_q[0]
//
// A requested bit that arrives free is set on the line and recorded as
// grabbed; a requested bit that arrives busy and was not ours stays busy and
// is not recorded; a bit we hold but no longer request is cleared on the line
// and in the grab register. After a FRAME of exactly N bits both registers
// are back in place, grab_q[i] telling whether busy bit i is held.
// grab_set / grab_clr set or clear the whole grab register, like the SET and
// RESET grab-register pins of the test chip.
//
// Timing: all registers change on the rising clock edge; BUSY_OUT and REQUEST
// are combinational from the registers and the decoded line inputs.
// The register structure, the shift directions and the equations follow the
// document. Its printed grab equation lacks the inversion of BUSY_IN that its
// own worked example and rules need; the inverted form is used. The document
// clocks the request register on the falling edge; here every register uses
// the rising edge so the line bit and the register bit stay in the same cycle.
module busy_lane #(
  parameter int unsigned N = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          frame,     // internal FRAME (shift enable)
  input  logic          busy_in,   // decoded incoming busy bit
  input  logic [N-1:0]  req_if,    // request interface register
  input  logic          grab_set,  // set all grab bits
  input  logic          grab_clr,  // clear all grab bits
  output logic          request,   // REQUEST, bit on the line now
  output logic          busy_out,  // outgoing busy bit (before encoding)
  output logic [N-1:0]  grab       // grab register
);

  logic [N-1:0] req_q, grab_q;
  logic         grab_new;

  assign request  = req_q[N-1];
  assign busy_out = req_q[N-1] | (busy_in & ~grab_q[N-1]);
  assign grab_new = req_q[N-1] & (~busy_in | grab_q[N-1]);
  assign grab     = grab_q;

  always_ff @(posedge clk) begin
    if (rst)        req_q <= '0;
    else if (frame) req_q <= {req_q[N-2:0], 1'b0};
    else            req_q <= req_if;
  end

  always_ff @(posedge clk) begin
    if (rst || grab_clr) grab_q <= '0;
    else if (grab_set)   grab_q <= '1;
    else if (frame)      grab_q <= {grab_q[N-2:0], grab_new};
  end

endmodule
