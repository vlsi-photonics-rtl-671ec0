// Testbench for busy_lane with 4 busy bits per FRAME.
//
// Part 1 replays the request / grab / release examples of the test-chip
// measurements, each as a 4-bit FRAME (processor 3's bit first) with the
// BUSY_OUT stream and the final grab register worked out by hand:
//   free bits, request <2>                 -> out 0100, grab 0100
//   <1>,<0> busy, request <2>              -> out 0111, grab 0100
//   free bits, request <3>,<0>             -> out 1001, grab 1001
//   all busy, keep <0>, release <3>        -> out 0111, grab 0001
//   grab register set, all busy, no request-> out 0000 (all released)
//   grab register cleared, all busy        -> out 1111 (none released)
//   request <3>,<1>, <3> busy, <1> free    -> out 1010, grab 0010
// Outside a FRAME, BUSY_OUT must be high when bit 3 is requested and must
// otherwise mirror BUSY_IN.
// Part 2 runs random FRAMEs against a per-processor reference model.
module tb_busy_lane;
  localparam int N = 4;
  logic clk = 1'b0, rst, frame, busy_in, grab_set, grab_clr;
  logic [N-1:0] req_if, grab;
  logic request, busy_out;
  logic [N-1:0] m_grab;
  int checks = 0, failures = 0;

  busy_lane #(.N(N)) dut (
    .clk(clk), .rst(rst), .frame(frame), .busy_in(busy_in), .req_if(req_if),
    .grab_set(grab_set), .grab_clr(grab_clr), .request(request), .busy_out(busy_out), .grab(grab)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One idle cycle so the request register takes req_if.
  task automatic idle(input int n = 1);
    frame = 0; busy_in = 0;
    repeat (n) begin @(posedge clk); #1; end
  endtask

  // A FRAME carrying busy bits bin (index = processor); checks BUSY_OUT
  // against exp_out and the grab register against exp_grab afterwards.
  task automatic run_frame(input logic [N-1:0] bin, input logic [N-1:0] exp_out,
                           input logic [N-1:0] exp_grab, input string name);
    logic [N-1:0] got;
    for (int p = N-1; p >= 0; p--) begin
      frame = 1; busy_in = bin[p];
      #1 got[p] = busy_out;
      @(posedge clk); #1;
    end
    frame = 0; busy_in = 0;
    checks += 2;
    if (got !== exp_out) begin failures++; $display("FAIL %s: busy_out %b exp %b", name, got, exp_out); end
    if (grab !== exp_grab) begin failures++; $display("FAIL %s: grab %b exp %b", name, grab, exp_grab); end
  endtask

  task automatic pulse_grab(input logic set, input logic clr);
    grab_set = set; grab_clr = clr;
    @(posedge clk); #1;
    grab_set = 0; grab_clr = 0;
  endtask

  initial begin
    rst = 1; frame = 0; busy_in = 0; grab_set = 0; grab_clr = 0; req_if = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // ---- Part 1: worked examples ----
    req_if = 4'b0100; idle();
    run_frame(4'b0000, 4'b0100, 4'b0100, "grab <2>, all free");
    pulse_grab(0, 1); idle();
    run_frame(4'b0011, 4'b0111, 4'b0100, "grab <2>, <1:0> busy");
    pulse_grab(0, 1);
    req_if = 4'b1001; idle();
    run_frame(4'b0000, 4'b1001, 4'b1001, "grab <3> and <0>");
    req_if = 4'b0001; idle();
    run_frame(4'b1111, 4'b0111, 4'b0001, "release <3>, hold <0>");
    req_if = 4'b0000; pulse_grab(1, 0); idle();
    run_frame(4'b1111, 4'b0000, 4'b0000, "grab register set: all released");
    pulse_grab(1, 0); pulse_grab(0, 1); idle();
    run_frame(4'b1111, 4'b1111, 4'b0000, "grab register cleared: none released");
    req_if = 4'b1010; idle();
    run_frame(4'b1000, 4'b1010, 4'b0010, "request <3>,<1>: <3> busy, <1> free");

    // Outside a FRAME.
    pulse_grab(0, 1);
    req_if = 4'b1000; idle();
    for (int k = 0; k < 4; k++) begin
      busy_in = k[0]; #1; checks++;
      if (busy_out !== 1'b1) begin failures++; $display("FAIL no FRAME, <3> requested"); end
    end
    req_if = 4'b0111; idle();
    for (int k = 0; k < 4; k++) begin
      busy_in = k[0]; #1; checks++;
      if (busy_out !== k[0]) begin failures++; $display("FAIL no FRAME, mirror BUSY_IN"); end
    end

    // ---- Part 2: random FRAMEs against a per-processor model ----
    pulse_grab(0, 1);
    m_grab = '0;
    for (int f = 0; f < 300; f++) begin
      logic [N-1:0] bin, eo, eg;
      req_if = N'($urandom);
      idle(1 + $urandom % 3);
      bin = N'($urandom);
      for (int p = 0; p < N; p++) begin
        if (req_if[p]) begin eo[p] = 1'b1; eg[p] = ~bin[p] | m_grab[p]; end
        else           begin eo[p] = bin[p] & ~m_grab[p]; eg[p] = 1'b0; end
      end
      run_frame(bin, eo, eg, "random");
      m_grab = eg;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
