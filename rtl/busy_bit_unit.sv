// BUSY BIT node: network access arbitration for the processors on the ring.
//
// Each processor owns one busy bit; a 1 means it is busy (reserved by some
// node). The busy bits circulate serially on LANES lines of NB bits each, led
// by a FRAME pulse on a line of its own. A node that wants processor i sets
// request bit i; when the stream passes, the node reserves ("grabs") the bit
// if it is free and records that in its grab register, and releases a bit it
// holds but no longer requests. One node, the master, can clear the ring and
// create a new FRAME whose length is set by its request register.
//
// Data flow, per incoming line (FRAME and each BUSY BIT lane):
//   two receive/buffer registers in the optical clock domain -> phase_sync
//   into the internal clock (tbps selects the valid clock phase) -> bb_decode
//   -> optional inversion (in_inv) -> frame_ctrl / busy_lane logic ->
//   bb_encode -> frame_out / busy_out.
// The inversion acts on the decoded bits: with the transition line code an
// inverted line would decode to the same bits, while the document's examples
// expect a static low line to read as a continuous FRAME when in_inv is set.
// A bit entering frame_in or busy_in leaves frame_out or busy_out 5 clock
// cycles later: 2 for receiving, 1 for the clock-domain crossing and 2 for
// decoding and encoding, the latency budget given in the document.
// int_frame is the decoded internal FRAME for the processor board.
//
// Host interface: bbi names one of the LANES*NB busy bits (bits above
// log2(NB) pick the lane); bbs / bbr set / reset its request; lgi_n loads the
// grab interface register and gis picks the bit shown on giro; gstat shows all
// grab interface bits; grab_set / grab_clr set / clear every grab register.
// rst must be held for at least 3 clock cycles.
//
// The blocks, their order and the latency budget come from the document; so
// do inversion, phase select, master/FRAME control and the host registers.
// Spreading 64 busy bits over 4 lanes of 16 sharing one FRAME, and taking the
// FRAME-creation REQUEST from lane 0, are this design's reading of it.
module busy_bit_unit
  import sw_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned NB    = 16
) (
  input  logic                          oclk,      // buffered optical input clock
  input  logic                          iclk,      // internal clock
  input  logic                          rst,
  input  logic                          in_inv,    // invert FRAME and BUSY BIT inputs
  input  logic                          tbps,      // 1: capture inputs on the falling edge
  input  logic                          ms,        // master node
  input  logic                          fc_in,     // FRAME reset / create control
  input  logic                          frame_in,  // encoded FRAME line from the ring
  input  logic [LANES-1:0]              busy_in,   // encoded BUSY BIT lines from the ring
  input  logic [$clog2(LANES*NB)-1:0]   bbi,       // busy bit index for bbs / bbr
  input  logic                          bbs,       // set request
  input  logic                          bbr,       // reset request
  input  logic                          grab_set,
  input  logic                          grab_clr,
  input  logic                          lgi_n,     // load grab interface register, active low
  input  logic [$clog2(LANES*NB)-1:0]   gis,       // grab interface select
  output logic                          frame_out, // encoded FRAME line to the ring
  output logic [LANES-1:0]              busy_out,  // encoded BUSY BIT lines to the ring
  output logic                          int_frame, // decoded FRAME for the board
  output logic [LANES*NB-1:0]           gstat,     // grab interface register
  output logic                          giro,      // selected grab interface bit
  output frame_state_e                  fstate     // FRAME logic state (observation)
);

  localparam int unsigned NL = LANES + 1;  // line 0: FRAME, lines 1..: BUSY BIT lanes

  logic [NL-1:0] line_in, rx1_q, rx2_q, sync_q, dec_q, int_q, enc_d, enc_q;
  logic [LANES*NB-1:0] req_if, grab_all;
  logic [LANES-1:0]    lane_req, lane_bout;  // only lane 0's REQUEST feeds FRAME creation
  logic                frame;

  assign line_in = {busy_in, frame_in};

  // FRAME / BUSY receive and buffering (optical clock domain).
  always_ff @(posedge oclk) begin
    if (rst) begin
      rx1_q <= '0;
      rx2_q <= '0;
    end else begin
      rx1_q <= line_in;
      rx2_q <= rx1_q;
    end
  end

  // Clock-domain synchronization to the internal clock.
  phase_sync #(.W(NL)) u_sync (
    .clk    (iclk),
    .sel_180(tbps),
    .d      (rx2_q),
    .q      (sync_q)
  );

  bb_decode #(.W(NL)) u_dec (
    .clk(iclk), .rst(rst), .d(sync_q), .q(dec_q)
  );

  assign int_q = dec_q ^ {NL{in_inv}};

  req_if_reg #(.N(LANES*NB)) u_req_if (
    .clk      (iclk),
    .rst      (rst),
    .addr     (bbi),
    .req_set  (bbs),
    .req_reset(bbr),
    .q        (req_if)
  );

  frame_ctrl u_frame (
    .clk     (iclk),
    .rst     (rst),
    .ms      (ms),
    .fc_in   (fc_in),
    .frame_in(int_q[0]),
    .request (lane_req[0]),
    .frame   (frame),
    .hif     (),
    .state   (fstate)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    busy_lane #(.N(NB)) u_lane (
      .clk     (iclk),
      .rst     (rst),
      .frame   (frame),
      .busy_in (int_q[l+1]),
      .req_if  (req_if[l*NB +: NB]),
      .grab_set(grab_set),
      .grab_clr(grab_clr),
      .request (lane_req[l]),
      .busy_out(lane_bout[l]),
      .grab    (grab_all[l*NB +: NB])
    );
  end

  assign enc_d = {lane_bout, frame};

  bb_encode #(.W(NL)) u_enc (
    .clk(iclk), .rst(rst), .d(enc_d), .q(enc_q)
  );

  grab_if_reg #(.N(LANES*NB)) u_gif (
    .clk  (iclk),
    .rst  (rst),
    .lgi_n(lgi_n),
    .grab (grab_all),
    .sel  (gis),
    .gstat(gstat),
    .giro (giro)
  );

  assign frame_out = enc_q[0];
  assign busy_out  = enc_q[NL-1:1];
  assign int_frame = frame;

endmodule
