// Optoelectronic Switch IC: one node of a fixed-path optical ring that links
// up to 16 processor boards (64 processors).
//
// Each board owns one optical path per processor. The Switch IC of a board
// lets the board's four processors (electrical ports A..D) drive any of the
// 64 optical output paths, passes every other path on unchanged to the next
// board, and hands the first four optical input paths to ports A..D. Access
// to a destination is arbitrated by the BUSY BIT protocol that runs beside
// the data on its own FRAME and BUSY BIT lines.
//
// Data path (every line double data rate, all paths and ports PW bits wide):
//   optical inputs  -> rx_demux (optical clock) -> switch_core: phase_sync
//                      into the internal clock, 2x2 switch chains, output
//                      register -> tx_mux (internal clock) -> optical outputs
//   electrical ports-> rx_demux (internal clock) -> switch_core -> tx_mux
// A bit pair crosses the chip in 4 internal clock cycles (demux, core input
// register, core output register, output retime) plus the half cycle of the
// output multiplexer.
//
// Control: dp_ctrl_regs holds one 64-bit switch control register per port
// and the initialization loop-back latches, loaded through EIOO/SLL/DPCRL.
// clk_select picks the internal clock (ICS), the optical output clock (OOCS)
// and the main or spare optical clock line (OICS); CPS sets the 180 degree
// capture phase for the optical data. TIS / BIS pick the main or spare
// FRAME / BUSY BIT lines. RESET (rst, synchronous to the internal clock)
// clears the control and BUSY BIT registers.
//
// The partitioning, widths, control signals and latencies follow the
// specification. Analog parts (LVDS receivers and drivers, terminations,
// clock delay elements, duty-cycle controls) are not modelled, and the FRAME
// and BUSY BIT input inversion of the test chips is not brought out (held
// off), as the specification's host interface does not list it.
// The grab interface register is read bit by bit through GIRO, as in the
// host interface; its parallel copy (gstat) is left unconnected here.
module switch_ic #(
  parameter int unsigned NPATH    = sw_pkg::NPATH,
  parameter int unsigned NPORT    = sw_pkg::NPORT,
  parameter int unsigned PW       = sw_pkg::PW,
  parameter int unsigned BB_LANES = sw_pkg::BB_LANES,
  parameter int unsigned BB_BITS  = sw_pkg::BB_BITS
) (
  // clocks
  input  logic                                   eclk_in,      // electrical input clock
  input  logic                                   oclk_main,    // optical input clock, main line
  input  logic                                   oclk_spare,   // optical input clock, spare line
  output logic                                   eoclk,        // electrical output clock
  output logic                                   ooclk,        // optical output clock
  // electrical I/O interface
  input  logic [NPORT-1:0][PW-1:0]               port_in,
  output logic [NPORT-1:0][PW-1:0]               port_out,
  // optoelectronic interfaces
  input  logic [NPATH-1:0][PW-1:0]               path_in,
  output logic [NPATH-1:0][PW-1:0]               path_out,
  input  logic                                   frame_in_main,
  input  logic                                   frame_in_spare,
  input  logic [BB_LANES-1:0]                    busy_in_main,
  input  logic [BB_LANES-1:0]                    busy_in_spare,
  output logic                                   frame_out,
  output logic [BB_LANES-1:0]                    busy_out,
  // host control interface
  input  logic                                   rst,          // RESET
  input  logic [$clog2(NPORT)+$clog2(NPATH)-1:0] eioo,
  input  logic                                   sll,
  input  logic                                   dpcrl,
  input  logic                                   dp_val,
  input  logic [$clog2(BB_LANES*BB_BITS)-1:0]    bbi,
  input  logic                                   bbr,
  input  logic                                   bbs,
  input  logic [$clog2(BB_LANES*BB_BITS)-1:0]    gis,
  input  logic                                   lgi_n,
  input  logic                                   tbps,
  input  logic                                   mic,
  input  logic                                   fc_in,
  input  logic                                   ics,
  input  logic                                   oocs,
  input  logic                                   cps,
  input  logic                                   oics,
  input  logic                                   tis,
  input  logic                                   bis,
  output logic                                   giro,
  output logic                                   teo,          // decoded FRAME to the board
  output sw_pkg::frame_state_e                   fstate
);

  localparam int unsigned DW = 2 * PW;

  logic oclk, iclk;

  logic [NPATH-1:0][DW-1:0]       opt_word, opt_word_out;
  logic [NPORT-1:0][DW-1:0]       el_word, el_word_out;
  logic [NPORT-1:0][NPATH-1:0]    ctrl;
  logic                           lb_port, lb_path0;
  logic [BB_LANES*BB_BITS-1:0]    gstat;

  clk_select u_clk (
    .eclk      (eclk_in),
    .oclk_main (oclk_main),
    .oclk_spare(oclk_spare),
    .oics      (oics),
    .ics       (ics),
    .oocs      (oocs),
    .oclk      (oclk),
    .iclk      (iclk),
    .ooclk     (ooclk),
    .eoclk     (eoclk)
  );

  rx_demux #(.W(NPATH*PW)) u_opt_rx (.clk(oclk), .d(path_in), .q(opt_word));
  rx_demux #(.W(NPORT*PW)) u_el_rx  (.clk(iclk), .d(port_in), .q(el_word));

  dp_ctrl_regs #(.NPATH(NPATH), .NPORT(NPORT)) u_ctrl (
    .clk     (iclk),
    .rst     (rst),
    .eioo    (eioo),
    .sll     (sll),
    .dpcrl   (dpcrl),
    .dp_val  (dp_val),
    .ctrl    (ctrl),
    .lb_port (lb_port),
    .lb_path0(lb_path0)
  );

  switch_core #(.NPATH(NPATH), .NPORT(NPORT), .DW(DW)) u_core (
    .clk     (iclk),
    .cps     (cps),
    .path_in (opt_word),
    .port_in (el_word),
    .ctrl    (ctrl),
    .lb_port (lb_port),
    .lb_path0(lb_path0),
    .path_out(opt_word_out),
    .port_out(el_word_out)
  );

  tx_mux #(.W(NPATH*PW)) u_opt_tx (.clk(iclk), .d(opt_word_out), .q(path_out));
  tx_mux #(.W(NPORT*PW)) u_el_tx  (.clk(iclk), .d(el_word_out),  .q(port_out));

  busy_bit_unit #(.LANES(BB_LANES), .NB(BB_BITS)) u_busy (
    .oclk     (oclk),
    .iclk     (iclk),
    .rst      (rst),
    .in_inv   (1'b0),
    .tbps     (tbps),
    .ms       (mic),
    .fc_in    (fc_in),
    .frame_in (tis ? frame_in_spare : frame_in_main),
    .busy_in  (bis ? busy_in_spare : busy_in_main),
    .bbi      (bbi),
    .bbs      (bbs),
    .bbr      (bbr),
    .grab_set (1'b0),
    .grab_clr (1'b0),
    .lgi_n    (lgi_n),
    .gis      (gis),
    .frame_out(frame_out),
    .busy_out (busy_out),
    .int_frame(teo),
    .gstat    (gstat),
    .giro     (giro),
    .fstate   (fstate)
  );

endmodule
