// Testbench for tx_mux: applies random two-bit words and checks that, one
// rising edge later, bit 0 is on the line during the high clock phase and
// bit 1 during the following low phase.
module tb_tx_mux;
  localparam int W = 3;
  localparam int K = 200;
  logic clk = 1'b0;
  logic [W-1:0][1:0] d;
  logic [W-1:0] q;
  logic [W-1:0][1:0] prev;
  int checks = 0, failures = 0;

  tx_mux #(.W(W)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(posedge clk); #1 d = (2*W)'($urandom);
    for (int k = 0; k < K; k++) begin
      prev = d;
      @(posedge clk); #2;
      d = (2*W)'($urandom);
      for (int i = 0; i < W; i++) begin
        checks++;
        if (q[i] !== prev[i][0]) begin
          failures++;
          $display("FAIL word %0d line %0d high phase: q=%b exp=%b", k, i, q[i], prev[i][0]);
        end
      end
      @(negedge clk); #2;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (q[i] !== prev[i][1]) begin
          failures++;
          $display("FAIL word %0d line %0d low phase: q=%b exp=%b", k, i, q[i], prev[i][1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
