// Clock source selection of the Switch IC.
//
// The internal clock drives the switch core and both output interfaces. The
// reference Switch IC of a network runs from the electrical input clock sent
// by the reference host; every other Switch IC runs from the optical clock
// received from the ring. The optical clock itself comes from one of two
// optoelectronic clock lines (main or spare).
//
//   oclk  = oics ? oclk_spare : oclk_main     optical input clock (OICS)
//   iclk  = ics  ? eclk : oclk                internal clock (ICS)
//   ooclk = oocs ? iclk : eclk                optical output clock (OOCS)
//   eoclk = iclk                              electrical output clock
//
// During initialization step 3 the reference IC runs its internal clock from
// the optical clock while it keeps sending the (buffered) electrical input
// clock to the ring, which is why the optical output clock has its own select.
// The selects are static host inputs; they are changed only while the affected
// logic is being re-synchronized, so plain multiplexers are used and no
// glitch-free switching is attempted (this is a choice of this design; the
// document only calls the element "a mux"). The analog delay elements and
// duty-cycle controls in these clock paths are not modelled.
module clk_select (
  input  logic eclk,        // electrical input clock (after delay element)
  input  logic oclk_main,   // optical input clock, main line
  input  logic oclk_spare,  // optical input clock, spare line
  input  logic oics,        // 1: use the spare optical clock line
  input  logic ics,         // 1: internal clock from electrical input clock
  input  logic oocs,        // 1: optical output clock is the internal clock
  output logic oclk,        // buffered optical input clock
  output logic iclk,        // internal clock
  output logic ooclk,       // optical output clock
  output logic eoclk        // electrical output clock
);

  always_comb begin
    oclk  = oics ? oclk_spare : oclk_main;
    iclk  = ics  ? eclk       : oclk;
    ooclk = oocs ? iclk       : eclk;
    eoclk = iclk;
  end

endmodule
