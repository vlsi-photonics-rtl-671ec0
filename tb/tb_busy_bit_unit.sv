// Testbench for busy_bit_unit with 2 lanes of 4 busy bits (the 4-bit FRAME
// of the test chips, plus a second lane).
//
// The testbench encodes its FRAME / BUSY BIT stimulus with the transition
// line code and decodes the node's output lines the same way, so every check
// is on the decoded bit streams:
//   - pass-through: a non-master node returns FRAME and BUSY BITs unchanged
//     exactly 5 cycles later, with either capture phase (tbps);
//   - request / grab / release with 4-bit FRAMEs (expected streams worked out
//     from the protocol rules), and the grab interface register and giro;
//   - FRAME creation by the master: reset while fc_in is high, then a FRAME
//     of m+1 bits for m leading request bits, during which the master grabs
//     the requested bits;
//   - input inversion: a static low line reads as a continuous FRAME.
module tb_busy_bit_unit
  import sw_pkg::*;
;
  localparam int LANES = 2, NB = 4, LAT = 5, MAXC = 2000;
  logic clk = 1'b0, rst, in_inv, tbps, ms, fc_in, bbs, bbr, grab_set, grab_clr, lgi_n;
  logic frame_in, frame_out, int_frame, giro;
  logic [LANES-1:0] busy_in, busy_out;
  logic [2:0] bbi, gis;
  logic [LANES*NB-1:0] gstat;
  frame_state_e fstate;

  int checks = 0, failures = 0, cyc = 0;
  logic in_fr [MAXC];
  logic [LANES-1:0] in_bb [MAXC];
  logic out_fr [MAXC];
  logic [LANES-1:0] out_bb [MAXC];
  logic prev_fo;
  logic [LANES-1:0] prev_bo;

  busy_bit_unit #(.LANES(LANES), .NB(NB)) dut (
    .oclk(clk), .iclk(clk), .rst(rst), .in_inv(in_inv), .tbps(tbps), .ms(ms), .fc_in(fc_in),
    .frame_in(frame_in), .busy_in(busy_in), .bbi(bbi), .bbs(bbs), .bbr(bbr),
    .grab_set(grab_set), .grab_clr(grab_clr), .lgi_n(lgi_n), .gis(gis),
    .frame_out(frame_out), .busy_out(busy_out), .int_frame(int_frame), .gstat(gstat),
    .giro(giro), .fstate(fstate)
  );

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // One clock cycle: put raw bits fr / bb on the encoded lines, clock, and
  // record the decoded output bits.
  task automatic step(input logic fr = 1'b0, input logic [LANES-1:0] bb = '0);
    in_fr[cyc] = fr;
    in_bb[cyc] = bb;
    frame_in = frame_in ^ fr;
    busy_in  = busy_in ^ bb;
    @(posedge clk); #1;
    cyc++;
    out_fr[cyc] = frame_out ^ prev_fo;
    out_bb[cyc] = busy_out ^ prev_bo;
    prev_fo = frame_out;
    prev_bo = busy_out;
    bbs = 0; bbr = 0; lgi_n = 1; grab_set = 0; grab_clr = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) step();
  endtask

  task automatic request(input int idx, input logic set);
    bbi = 3'(idx);
    if (set) bbs = 1; else bbr = 1;
    step();
  endtask

  // Send a 4-bit FRAME with busy bits b0 (lane 0) and b1 (lane 1), given as
  // processor-indexed vectors, and check the decoded BUSY_OUT streams.
  task automatic frame4(input logic [NB-1:0] b0, input logic [NB-1:0] b1,
                        input logic [NB-1:0] e0, input logic [NB-1:0] e1, input string name);
    int c0 = cyc;
    logic [NB-1:0] g0, g1;
    for (int p = NB-1; p >= 0; p--) step(1'b1, {b1[p], b0[p]});
    idle(LAT + 1);
    for (int i = 0; i < NB; i++) begin
      g0[NB-1-i] = out_bb[c0 + i + LAT][0];
      g1[NB-1-i] = out_bb[c0 + i + LAT][1];
      chk(out_fr[c0 + i + LAT] == 1'b1, {name, ": FRAME passes"});
    end
    chk(g0 == e0, $sformatf("%s: lane 0 BUSY_OUT %b exp %b", name, g0, e0));
    chk(g1 == e1, $sformatf("%s: lane 1 BUSY_OUT %b exp %b", name, g1, e1));
  endtask

  task automatic load_gif(input logic [LANES*NB-1:0] exp, input string name);
    lgi_n = 0;
    step();
    chk(gstat == exp, $sformatf("%s: gstat %b exp %b", name, gstat, exp));
    for (int k = 0; k < LANES*NB; k++) begin
      gis = 3'(k); #1;
      chk(giro == exp[k], {name, ": giro"});
    end
  endtask

  // Find the created FRAME in the decoded output after cycle c0 and check
  // its length and the lane 0 busy bits that travel with it.
  task automatic check_created(input int c0, input int exp_len, input logic [7:0] exp_b0, input string name);
    int first = -1, len = 0;
    logic [7:0] b = '0;
    for (int c = c0; c < cyc; c++) if (out_fr[c] && first < 0) first = c;
    if (first >= 0) while (out_fr[first + len] && len < 8) begin
      b[7-len] = out_bb[first + len][0];
      len++;
    end
    chk(len == exp_len, $sformatf("%s: created FRAME length %0d exp %0d", name, len, exp_len));
    chk(b == exp_b0, $sformatf("%s: lane 0 busy bits %b exp %b", name, b, exp_b0));
  endtask

  int c_start, first;

  initial begin
    rst = 1; in_inv = 0; tbps = 0; ms = 0; fc_in = 0; bbs = 0; bbr = 0; bbi = 0;
    grab_set = 0; grab_clr = 0; lgi_n = 1; gis = 0; frame_in = 0; busy_in = '0;
    prev_fo = 0; prev_bo = '0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    prev_fo = frame_out; prev_bo = busy_out;
    idle(8);

    // ---- latency of a single FRAME bit ----
    c_start = cyc;
    step(1'b1, 2'b01);
    idle(10);
    first = -1;
    for (int c = c_start; c < cyc; c++) if (out_fr[c] && first < 0) first = c;
    chk(first - c_start == LAT, $sformatf("pass-through latency %0d exp %0d", first - c_start, LAT));

    // ---- random pass-through, both capture phases ----
    for (int ph = 0; ph < 2; ph++) begin
      tbps = ph[0];
      idle(4);
      c_start = cyc;
      for (int k = 0; k < 100; k++) step(1'($urandom), 2'($urandom));
      idle(LAT + 1);
      for (int c = c_start; c < c_start + 100; c++) begin
        chk(out_fr[c + LAT] == in_fr[c], "FRAME pass-through");
        chk(out_bb[c + LAT] == in_bb[c], "BUSY BIT pass-through");
      end
    end
    tbps = 0;

    // ---- request, grab, release ----
    grab_clr = 1; step();
    request(3, 1); request(0, 1); request(4 + 2, 1);
    idle(3);
    frame4(4'b0000, 4'b0000, 4'b1001, 4'b0100, "grab <3>,<0> and lane 1 <2>");
    load_gif(8'b0100_1001, "after grab");
    request(3, 0);
    idle(3);
    frame4(4'b1111, 4'b1111, 4'b0111, 4'b1111, "release <3>");
    load_gif(8'b0100_0001, "after release");
    frame4(4'b0011, 4'b0000, 4'b0011, 4'b0100, "hold <0>, others busy");
    request(0, 0); request(4 + 2, 0);
    idle(3);
    frame4(4'b1111, 4'b1111, 4'b1110, 4'b1011, "release all");
    load_gif(8'b0000_0000, "after release all");

    // ---- FRAME creation by the master ----
    request(3, 1); request(2, 1); request(1, 1);
    ms = 1; fc_in = 1;
    idle(20);
    chk(fstate == FR_INIT && int_frame == 1'b0, "master reset holds FRAME low");
    c_start = cyc;
    fc_in = 0;
    idle(20);
    check_created(c_start, 4, 8'b1110_0000, "B<3:1> set");
    chk(fstate == FR_PASS, "pass-through after creation");
    load_gif(8'b0000_1110, "master grabbed the requested bits");

    request(2, 0); request(1, 0);
    fc_in = 1;
    idle(20);
    c_start = cyc;
    fc_in = 0;
    idle(20);
    check_created(c_start, 2, 8'b1000_0000, "only B<3> set");

    request(3, 0); request(2, 1);
    fc_in = 1; idle(20);
    c_start = cyc;
    fc_in = 0; idle(20);
    check_created(c_start, 0, 8'b0000_0000, "B<3> clear: no FRAME");

    // ---- input inversion ----
    in_inv = 1; fc_in = 1;
    idle(10);
    chk(int_frame == 1'b0, "inverted input, reset: internal FRAME low");
    fc_in = 0;
    idle(10);
    chk(int_frame == 1'b1, "inverted static low input reads as FRAME");
    in_inv = 0;
    idle(10);
    chk(int_frame == 1'b0, "no inversion: internal FRAME low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
