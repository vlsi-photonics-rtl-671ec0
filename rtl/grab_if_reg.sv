// Grab interface register: the host-readable copy of the grab register.
//
// While the active-low load enable lgi_n is low, the grab register is copied
// into gstat on every rising clock edge; otherwise gstat holds, so the host
// reads a stable snapshot. The host should load it while no FRAME passes the
// node, ideally right after one has passed. giro is the bit of gstat named by
// sel, for a host interface with a single grab status output.
//
// Timing: gstat changes on the rising edge that samples lgi_n low; giro is
// combinational from gstat and sel. The register, its active-low load and the
// single-bit select output follow the document. A clocked enable instead of
// using the load input as a clock, and active-high status bits (a 1 means
// grabbed), are this design's choices.
module grab_if_reg #(
  parameter int unsigned N = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  lgi_n,   // load grab interface, active low
  input  logic [N-1:0]          grab,
  input  logic [$clog2(N)-1:0]  sel,
  output logic [N-1:0]          gstat,
  output logic                  giro
);

  always_ff @(posedge clk) begin
    if (rst)         gstat <= '0;
    else if (!lgi_n) gstat <= grab;
  end

  assign giro = gstat[sel];

endmodule
