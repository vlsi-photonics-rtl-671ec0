// 2:1 output multiplexer for one group of double-data-rate lines.
//
// A two-bit word per line is retimed on the rising clock edge, then sent out
// on the two halves of the clock period: bit 0 while the clock is high, bit 1
// while it is low. This mirrors the output stage in which two pre-discharged
// sense amps, clocked on opposite phases, feed a NOR gate: only the amp in its
// evaluate phase drives, so the NOR acts as a multiplexer without a clock of
// its own. Here the clock itself steers the selection, so d is one clock cycle
// (the retime register) ahead of the corresponding output pair.
//
// Interface: clk, d[W][2] words, q[W] serial lines.
// The 2:1 muxing and the retiming are from the document; the bit order is
// this design's choice and matches rx_demux.
module tx_mux #(
  parameter int unsigned W = 1
) (
  input  logic               clk,
  input  logic [W-1:0][1:0]  d,
  output logic [W-1:0]       q
);

  logic [W-1:0][1:0] word_q;

  always_ff @(posedge clk) word_q <= d;

  always_comb begin
    for (int i = 0; i < W; i++) q[i] = clk ? word_q[i][0] : word_q[i][1];
  end

endmodule
