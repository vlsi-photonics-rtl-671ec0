// Testbench for bb_encode and bb_decode. A random bit stream is encoded and
// decoded back; the decoded stream must equal the input two cycles later.
// The encoded line itself is checked against the transition code (it must
// toggle exactly for the 1 bits), and a separately driven line is decoded
// and checked against its transitions.
module tb_bb_codec;
  localparam int W = 2;
  localparam int K = 300;
  logic clk = 1'b0, rst;
  logic [W-1:0] d, line, dec, line2, dec2;
  logic [W-1:0] hist_d [K+3];
  logic [W-1:0] hist_l [K+3];
  logic [W-1:0] hist_l2 [K+3];
  int checks = 0, failures = 0;

  bb_encode #(.W(W)) u_enc (.clk(clk), .rst(rst), .d(d), .q(line));
  bb_decode #(.W(W)) u_dec (.clk(clk), .rst(rst), .d(line), .q(dec));
  bb_decode #(.W(W)) u_dec2 (.clk(clk), .rst(rst), .d(line2), .q(dec2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = '0; line2 = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < K; k++) begin
      d = W'($urandom);
      line2 = W'($urandom);
      hist_d[k] = d;
      hist_l2[k] = line2;
      @(posedge clk); #1;
      hist_l[k] = line;                    // line after the edge that took d[k]
      if (k >= 1) begin
        checks++;
        if (line !== (hist_l[k-1] ^ hist_d[k])) begin
          failures++; $display("FAIL encode k=%0d", k);
        end
        checks++;
        if (dec2 !== (hist_l2[k] ^ hist_l2[k-1])) begin
          failures++; $display("FAIL decode of driven line k=%0d", k);
        end
      end
      if (k >= 2) begin
        checks++;
        if (dec !== hist_d[k-1]) begin
          failures++; $display("FAIL round trip k=%0d dec=%b exp=%b", k, dec, hist_d[k-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
