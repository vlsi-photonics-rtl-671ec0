// FRAME logic of a BUSY BIT node: pass-through, initialization and creation
// of the FRAME that marks the start of the serial busy-bit stream.
//
// Every node except the master (ms = 0) only passes the FRAME on. The master
// can take over the ring:
//   FR_INIT    entered whenever ms and fc_in are both high. The outgoing
//              FRAME is held low whatever arrives (HIF, hide incoming frame,
//              is high), so the ring fills with zeros.
//   FR_CREATE  entered from FR_INIT when fc_in is low, REQUEST is high and
//              the incoming FRAME is low. If REQUEST is low when fc_in falls,
//              no FRAME can be created and the logic goes straight to
//              FR_PASS. The outgoing FRAME follows HIF, which stays high while
//              the request register shifts out ones and one cycle after the
//              last one: with m ones at the top of the request register the
//              new FRAME is m+1 bits long. If the top request bit is 0 no
//              FRAME is created.
//   FR_PASS    entered from FR_CREATE when HIF and the incoming FRAME are
//              both low, and whenever ms is low. The outgoing FRAME is the
//              incoming FRAME.
//
// Timing: the state register changes on the rising clock edge; frame and hif
// are combinational from the state, frame_in and request, so a created FRAME
// starts in the cycle after fc_in is seen low.
// The three states, their outputs and the transitions are the document's.
// Leaving FR_INIT for FR_PASS when REQUEST is low follows its equations and
// its measured examples (its state diagram shows only the way to FR_CREATE).
// Its equations give a FRAME of m bits while its text and timing diagram give
// m+1; the text is followed, by holding HIF one cycle after REQUEST falls.
module frame_ctrl
  import sw_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ms,        // this node is the master
  input  logic         fc_in,     // FRAME create / reset control
  input  logic         frame_in,  // decoded incoming FRAME
  input  logic         request,   // REQUEST from the request register
  output logic         frame,     // internal FRAME (= FRAME_OUT before encoding)
  output logic         hif,       // hide incoming frame
  output frame_state_e state
);

  frame_state_e state_d;
  logic         req_q;     // REQUEST was high in the previous creation cycle

  always_comb begin
    unique case (state)
      FR_INIT: begin
        hif   = 1'b1;
        frame = 1'b0;
      end
      FR_CREATE: begin
        hif   = request | req_q;
        frame = hif;
      end
      default: begin
        hif   = 1'b0;
        frame = frame_in;
      end
    endcase
  end

  always_comb begin
    state_d = state;
    if (!ms)        state_d = FR_PASS;
    else if (fc_in) state_d = FR_INIT;
    else begin
      unique case (state)
        FR_INIT:   if (!request)          state_d = FR_PASS;
                   else if (!frame_in)    state_d = FR_CREATE;
        FR_CREATE: if (!frame_in && !hif) state_d = FR_PASS;
        default:                          state_d = FR_PASS;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= FR_PASS;
      req_q <= 1'b0;
    end else begin
      state <= state_d;
      req_q <= (state == FR_CREATE) && request;
    end
  end

endmodule
