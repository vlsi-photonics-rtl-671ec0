// Testbench for rx_demux: feeds random double-data-rate bit pairs on three
// lines (first bit of a pair held across the rising edge, second across the
// falling edge) and checks that each pair appears as {second, first} on q
// one clock cycle after its first bit was sampled.
module tb_rx_demux;
  localparam int W = 3;
  localparam int K = 200;
  logic clk = 1'b0;
  logic [W-1:0] d;
  logic [W-1:0][1:0] q;
  int checks = 0, failures = 0;
  logic [W-1:0] a_bits [K+1];
  logic [W-1:0] b_bits [K+1];

  rx_demux #(.W(W)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= K; k++) begin
      a_bits[k] = W'($urandom);
      b_bits[k] = W'($urandom);
    end
    d = '0;
    @(negedge clk); #1 d = a_bits[0];
    for (int k = 0; k < K; k++) begin
      @(posedge clk); #1;
      if (k >= 1) begin
        for (int i = 0; i < W; i++) begin
          checks++;
          if (q[i] !== {b_bits[k-1][i], a_bits[k-1][i]}) begin
            failures++;
            $display("FAIL pair %0d line %0d: q=%b exp=%b", k-1, i, q[i], {b_bits[k-1][i], a_bits[k-1][i]});
          end
        end
      end
      d = b_bits[k];
      @(negedge clk); #1 d = a_bits[k+1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
