// Data path control registers loaded from the host control interface.
//
// One NPATH-bit register per electrical port holds the controls of that
// port's 2x2 switches (bit k set: the port drives optical path k). The host
// addresses a single latch with the 8-bit EIOO address, whose upper two bits
// name the electrical port and lower six bits the optical path, and loads the
// value on dp_val while DPCRL is high. With SLL high the same strobe loads one
// of the synchronization loop-back latches instead: EIOO bit 0 = 0 selects the
// PORT A to PORT B loop-back, 1 the PATH 0 to PORT B loop-back. RESET clears
// every latch.
//
// Timing: a load is sampled on the rising clock edge and appears on ctrl one
// cycle later. The register organisation, the EIOO/SLL/DPCRL/RESET controls
// and their meaning come from the document; the clocked (rather than level
// sensitive) load, the data line dp_val and the loop-back latch addressing are
// this design's choices.
module dp_ctrl_regs #(
  parameter int unsigned NPATH = 64,
  parameter int unsigned NPORT = 4
) (
  input  logic                                        clk,
  input  logic                                        rst,      // RESET, active high
  input  logic [$clog2(NPORT)+$clog2(NPATH)-1:0]      eioo,     // {port, path}
  input  logic                                        sll,      // select loop-back latches
  input  logic                                        dpcrl,    // load strobe
  input  logic                                        dp_val,   // value to load
  output logic [NPORT-1:0][NPATH-1:0]                 ctrl,
  output logic                                        lb_port,
  output logic                                        lb_path0
);

  localparam int unsigned PB = $clog2(NPATH);

  logic [$clog2(NPORT)-1:0] port_sel;
  logic [PB-1:0]            path_sel;

  assign path_sel = eioo[PB-1:0];
  assign port_sel = eioo[$bits(eioo)-1:PB];

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl     <= '0;
      lb_port  <= 1'b0;
      lb_path0 <= 1'b0;
    end else if (dpcrl) begin
      if (sll) begin
        if (eioo[0]) lb_path0 <= dp_val;
        else         lb_port  <= dp_val;
      end else begin
        ctrl[port_sel][path_sel] <= dp_val;
      end
    end
  end

endmodule
