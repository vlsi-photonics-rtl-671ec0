// 1:2 demultiplexing receiver for one group of double-data-rate lines.
//
// Each input line carries two bits per clock period. One sampler captures the
// line on the rising clock edge (bit a, the first bit of the pair) and a
// second captures it on the falling edge (bit b), as the two sense-amp
// flip-flops of the receiver do with clk and its complement. A third register
// aligns the pair on the next rising edge, so word = {b, a} is one clock cycle
// behind the rising-edge sample: the "retimed and demuxed, 1 cycle" stage of
// the optoelectronic input interface.
//
// Interface: d[W] serial lines; q[W] two-bit words, q[i][0] = bit a,
// q[i][1] = bit b. The analog front end (low-swing differential sensing) is
// not modelled; the two-edge sampling follows the document, the alignment
// register and bit order are this design's choice.
module rx_demux #(
  parameter int unsigned W = 1
) (
  input  logic               clk,
  input  logic [W-1:0]       d,
  output logic [W-1:0][1:0]  q
);

  logic [W-1:0] a_q, b_q;

  always_ff @(posedge clk) a_q <= d;
  always_ff @(negedge clk) b_q <= d;

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) q[i] <= {b_q[i], a_q[i]};
  end

endmodule
