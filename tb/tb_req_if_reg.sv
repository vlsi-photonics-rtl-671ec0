// Testbench for req_if_reg with 4 bits (BIT<1:0> addressing). First the rows
// of the request-interface truth table are applied in order (set each bit,
// then reset each bit, idle rows), then random set / reset / idle strobes.
// A shadow register predicts q after each clock.
module tb_req_if_reg;
  localparam int N = 4;
  logic clk = 1'b0, rst, s, r;
  logic [1:0] addr;
  logic [N-1:0] q, m;
  int checks = 0, failures = 0;

  req_if_reg #(.N(N)) dut (.clk(clk), .rst(rst), .addr(addr), .req_set(s), .req_reset(r), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic ss, input logic rr, input logic [1:0] a);
    s = ss; r = rr; addr = a;
    @(posedge clk); #1;
    if (ss && !rr) m[a] = 1'b1;
    if (rr && !ss) m[a] = 1'b0;
    checks++;
    if (q !== m) begin failures++; $display("FAIL set=%b reset=%b addr=%0d q=%b exp=%b", ss, rr, a, q, m); end
  endtask

  initial begin
    rst = 1; s = 0; r = 0; addr = 0;
    @(posedge clk); #1 rst = 0; m = '0;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    for (int b = 0; b < N; b++) step(1, 0, 2'(b));          // set #0..#3
    if (q !== 4'b1111) begin failures++; end
    checks++;
    step(0, 0, 2'd2);                                         // inactive
    for (int b = 0; b < N; b++) step(0, 1, 2'(b));          // reset #0..#3
    checks++;
    if (q !== 4'b0000) begin failures++; end
    for (int k = 0; k < 500; k++) begin
      automatic int c = $urandom % 3;
      step(c == 1, c == 2, 2'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
