// Testbench for frame_ctrl. A small request shift register in the
// testbench stands in for the node's request register (it loads the request
// bits while FRAME is low and shifts while FRAME is high).
// Checked: a non-master and an idle master pass FRAME_IN through; a master
// with fc_in high holds FRAME low and HIF high whatever arrives; after fc_in
// falls with FRAME_IN low, a FRAME of m+1 cycles is created, starting one
// cycle later, where m is the number of leading ones of the request bits
// (none if the top bit is 0); the logic then passes FRAME_IN again; and an
// incoming FRAME delays creation until it has passed.
module tb_frame_ctrl
  import sw_pkg::*;
;
  logic clk = 1'b0, rst, ms, fc_in, frame_in, request, frame, hif;
  frame_state_e state;
  logic [3:0] breq, rq;
  int checks = 0, failures = 0;
  int n_pass = 0, n_init = 0, n_create = 0;

  frame_ctrl dut (
    .clk(clk), .rst(rst), .ms(ms), .fc_in(fc_in), .frame_in(frame_in),
    .request(request), .frame(frame), .hif(hif), .state(state)
  );

  assign request = rq[3];
  always_ff @(posedge clk) rq <= frame ? {rq[2:0], 1'b0} : breq;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (state == FR_PASS) n_pass++;
    if (state == FR_INIT) n_init++;
    if (state == FR_CREATE) n_create++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Master resets the ring, releases fc_in and measures the created FRAME.
  task automatic create(input logic [3:0] req_bits, input int exp_len);
    int len, wait_cycles;
    breq = req_bits; ms = 1; fc_in = 1; frame_in = 1;
    repeat (3) begin
      @(posedge clk); #1;
      chk(frame == 1'b0 && hif == 1'b1 && state == FR_INIT, "reset holds FRAME low");
    end
    frame_in = 0;
    @(posedge clk); #1;
    fc_in = 0;
    #1 chk(frame == 1'b0, "no FRAME in the cycle fc_in falls");
    @(posedge clk); #1;
    len = 0; wait_cycles = 0;
    while (frame && len < 10) begin len++; @(posedge clk); #1; end
    chk(len == exp_len, $sformatf("created FRAME length %0d exp %0d", len, exp_len));
    repeat (2) @(posedge clk); #1;
    chk(state == FR_PASS, "back to pass-through after creation");
    frame_in = 1; #1 chk(frame == 1'b1, "pass after creation");
    frame_in = 0; #1 chk(frame == 1'b0, "pass after creation");
  endtask

  initial begin
    rst = 1; ms = 0; fc_in = 0; frame_in = 0; breq = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // Non-master: always pass-through, whatever fc_in does.
    for (int k = 0; k < 50; k++) begin
      frame_in = 1'($urandom); fc_in = 1'($urandom); breq = 4'($urandom);
      @(posedge clk); #1;
      frame_in = 1'($urandom); #1;
      chk(frame == frame_in && state == FR_PASS, "non-master pass-through");
    end
    // Idle master passes too.
    ms = 1; fc_in = 0;
    for (int k = 0; k < 20; k++) begin
      frame_in = 1'($urandom); #1;
      chk(frame == frame_in && state == FR_PASS, "master pass-through");
      @(posedge clk); #1;
    end

    create(4'b1000, 2);
    create(4'b1100, 3);
    create(4'b1110, 4);
    create(4'b1111, 5);
    create(4'b0111, 0);

    // Creation waits for an incoming FRAME to pass.
    breq = 4'b1000; ms = 1; fc_in = 1; frame_in = 1;
    repeat (2) @(posedge clk); #1;
    fc_in = 0;
    repeat (3) begin
      @(posedge clk); #1;
      chk(state == FR_INIT && frame == 1'b0, "creation waits while FRAME_IN is high");
    end
    frame_in = 0;
    @(posedge clk); #1;
    chk(frame == 1'b1 && state == FR_CREATE, "creation after FRAME_IN falls");

    chk(n_pass > 0 && n_init > 0 && n_create > 0, "all three states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
