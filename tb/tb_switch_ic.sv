// End-to-end testbench of the Switch IC at its full size (64 optical paths,
// 4 electrical ports, 12-bit double data rate lines, 4 x 16 BUSY BITs); it
// overrides no parameter.
//
// Data path: every optical path and electrical port carries random data on
// both clock phases, every cycle. A reference model computes, from the
// switch settings the testbench loaded through the host interface, what each
// output must carry 4 cycles later (insertion of a port into a path, flow
// through, PATH n to PORT n, the two loop-backs), for each half cycle. The
// test goes through: all switches open, port insertion with several ports
// on one path (the last port of the chain wins), 180 degree capture (CPS),
// the electrical clock as internal clock (ICS), the spare optical clock line
// (OICS) with the main line stopped, both loop-backs, and RESET clearing the
// switches.
//
// BUSY BIT ring: the switch is the master of a ring of 16 nodes. The
// testbench closes the ring with a delay line of 75 cycles (the 15 other
// nodes at 5 cycles each) in which one other node, modelled bit by bit from
// the protocol rules, can request and hold processors too. The test resets
// the FRAME, creates a 16-bit FRAME, checks that it circulates with the
// right length and period, then grabs and releases processors, is denied a
// processor the other node holds until that node releases it, reads the
// grab state through GIRO, moves the ring to the spare FRAME and BUSY BIT
// lines while the main lines carry noise, and grabs and releases once more
// with the FRAME / BUSY BIT lines taken on the falling edge (TBPS).
//
// Each mechanism is counted; one that never happened counts as a failure.
module tb_switch_ic
  import sw_pkg::*;
;
  localparam int L = 4;                  // data path latency in cycles
  localparam int D = 75;                 // rest of the ring, cycles
  localparam int RT = D + 5;             // ring round trip

  logic clk = 1'b0, main_en = 1'b1;
  always #5 clk = ~clk;

  logic eclk_in, oclk_main, oclk_spare, eoclk, ooclk;
  logic [NPORT-1:0][PW-1:0] port_in, port_out;
  logic [NPATH-1:0][PW-1:0] path_in, path_out;
  logic frame_in_main, frame_in_spare, frame_out;
  logic [BB_LANES-1:0] busy_in_main, busy_in_spare, busy_out;
  logic rst, sll, dpcrl, dp_val, bbr, bbs, lgi_n, tbps, mic, fc_in, ics, oocs, cps, oics, tis, bis;
  logic giro, teo;
  logic [7:0] eioo;
  logic [5:0] bbi, gis;
  frame_state_e fstate;

  assign eclk_in    = clk;
  assign oclk_main  = clk & main_en;
  assign oclk_spare = clk;

  switch_ic dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- data path reference ----------------
  logic [NPORT-1:0][NPATH-1:0] sh_ctrl = '0;
  logic sh_lbp = 1'b0, sh_lb0 = 1'b0;
  logic [NPATH-1:0][PW-1:0] h_path [8][2];
  logic [NPORT-1:0][PW-1:0] h_port [8][2];
  int k = 0, settle = 0;
  int n_flow = 0, n_insert = 0, n_chain = 0, n_p2p = 0, n_lbport = 0, n_lbpath0 = 0;
  int n_cps1 = 0, n_ics1 = 0, n_oics = 0, n_rstclr = 0, n_oclk = 0;
  logic rst_seen = 1'b0;

  task automatic check_word(input int w, input int h);
    int s = w % 8;
    for (int n = 0; n < NPATH; n++) begin
      logic [PW-1:0] e = h_path[s][h][n];
      int nsel = 0;
      for (int p = 0; p < NPORT; p++) if (sh_ctrl[p][n]) begin e = h_port[s][h][p]; nsel++; end
      chk(path_out[n] == e, $sformatf("path_out[%0d] half %0d", n, h));
      if (nsel == 0) n_flow++; else n_insert++;
      if (nsel > 1) n_chain++;
    end
    for (int p = 0; p < NPORT; p++) begin
      logic [PW-1:0] e = h_path[s][h][p];
      if (p == 1 && sh_lb0) begin e = h_path[s][h][0]; n_lbpath0++; end
      else if (p == 1 && sh_lbp) begin e = h_port[s][h][0]; n_lbport++; end
      else n_p2p++;
      chk(port_out[p] == e, $sformatf("port_out[%0d] half %0d", p, h));
    end
    if (cps) n_cps1++;
    if (ics) n_ics1++;
    if (oics && !main_en) n_oics++;
    if (rst_seen && sh_ctrl == '0) n_rstclr++;
  endtask

  task automatic drive(input int h);
    for (int n = 0; n < NPATH; n++) h_path[k % 8][h][n] = PW'($urandom);
    for (int p = 0; p < NPORT; p++) h_port[k % 8][h][p] = PW'($urandom);
    path_in = h_path[k % 8][h];
    port_in = h_port[k % 8][h];
  endtask

  initial begin
    path_in = '0; port_in = '0;
    forever begin
      @(negedge clk); #1;
      if (settle >= 8) check_word(k - L - 1, 1);
      drive(0);
      @(posedge clk); #1;
      if (settle >= 8) check_word(k - L, 0);
      drive(1);
      k++;
      settle++;
    end
  end

  // The output clocks follow the selects.
  always @(eoclk or ooclk) if (settle >= 2) begin
    #0;
    chk(eoclk == clk && ooclk == clk, "output clocks");
    n_oclk++;
  end

  // ---------------- BUSY BIT ring model ----------------
  logic [BB_LANES:0] dq [D];
  logic [BB_LANES:0] prev_out = '0, raw_out, del, in_state = '0;
  logic ring_on = 1'b0, spare_mode = 1'b0;
  int fcnt = 0;
  logic [63:0] other_req = '0, other_grab = '0;
  // decoded DUT output FRAMEs
  int run = 0, run_start = 0, last_start = -1, cyc = 0;
  int n_frames = 0, n_bad_len = 0, n_bad_period = 0;
  logic [63:0] cur_bits, last_bits;
  logic check_frames = 1'b0;

  initial for (int i = 0; i < D; i++) dq[i] = '0;

  always @(negedge clk) if (ring_on) begin
    cyc++;
    raw_out  = {busy_out, frame_out} ^ prev_out;
    prev_out = {busy_out, frame_out};
    if (raw_out[0]) begin
      if (run == 0) run_start = cyc;
      if (run < BB_BITS)
        for (int l = 0; l < BB_LANES; l++) cur_bits[l*BB_BITS + BB_BITS-1-run] = raw_out[l+1];
      run++;
    end else if (run != 0) begin
      n_frames++;
      if (check_frames) begin
        if (run != BB_BITS) n_bad_len++;
        if (last_start >= 0 && run_start - last_start != RT) n_bad_period++;
      end
      last_start = run_start;
      last_bits = cur_bits;
      run = 0;
    end
    del = dq[D-1];
    for (int i = D-1; i > 0; i--) dq[i] = dq[i-1];
    dq[0] = raw_out;
    // the other node, sitting just before this switch
    if (del[0]) begin
      if (fcnt < BB_BITS)
        for (int l = 0; l < BB_LANES; l++) begin
          automatic int i = l*BB_BITS + BB_BITS-1-fcnt;
          automatic logic b = del[l+1];
          del[l+1] = other_req[i] | b & ~other_grab[i];
          other_grab[i] = other_req[i] & (~b | other_grab[i]);
        end
      fcnt++;
    end else fcnt = 0;
    in_state ^= del;
    frame_in_spare = in_state[0];
    busy_in_spare  = in_state[BB_LANES:1];
    frame_in_main  = spare_mode ? 1'($urandom) : in_state[0];
    busy_in_main   = spare_mode ? BB_LANES'($urandom) : in_state[BB_LANES:1];
  end

  // ---------------- host interface ----------------
  task automatic cycles(input int n);
    repeat (n) begin
      @(negedge clk); #2;
      dpcrl = 0; sll = 0; bbs = 0; bbr = 0; lgi_n = 1;
    end
  endtask

  task automatic cfg(input int p, input int n, input logic v);
    settle = 0;
    eioo = {2'(p), 6'(n)}; dp_val = v; dpcrl = 1; sll = 0;
    sh_ctrl[p][n] = v;
    cycles(1);
  endtask

  task automatic loopback(input logic path0, input logic v);
    settle = 0;
    eioo = {7'd0, path0}; dp_val = v; dpcrl = 1; sll = 1;
    if (path0) sh_lb0 = v; else sh_lbp = v;
    cycles(1);
  endtask

  task automatic req(input int i, input logic set);
    bbi = 6'(i);
    if (set) bbs = 1; else bbr = 1;
    cycles(1);
  endtask

  // Load the grab interface register and read one bit through GIRO.
  task automatic giro_read(input int i, output logic v);
    lgi_n = 0;
    cycles(1);
    gis = 6'(i);
    #1 v = giro;
  endtask

  int n_tbps = 0, n_reset = 0, n_create = 0, n_grab = 0, n_release = 0, n_denied = 0, n_giro = 0, n_spare = 0, n_teo = 0;
  logic v;

  initial begin
    rst = 1; eioo = '0; sll = 0; dpcrl = 0; dp_val = 0; bbi = '0; bbr = 0; bbs = 0; gis = '0;
    lgi_n = 1; tbps = 0; mic = 1; fc_in = 1; ics = 0; oocs = 0; cps = 0; oics = 0; tis = 0; bis = 0;
    frame_in_main = 0; frame_in_spare = 0; busy_in_main = '0; busy_in_spare = '0;
    cycles(5);
    rst = 0;
    ring_on = 1;
    settle = 0;

    // ---- data path ----
    cycles(40);                                    // all switches open
    for (int p = 0; p < NPORT; p++)
      for (int j = 0; j < 6; j++) cfg(p, 16*p + 3*j + 1, 1'b1);
    cfg(0, 50, 1'b1); cfg(2, 50, 1'b1);            // two ports on one path
    cfg(1, 63, 1'b1); cfg(3, 63, 1'b1); cfg(0, 63, 1'b1);
    cycles(40);
    cps = 1; settle = 0; cycles(40); cps = 0; settle = 0;
    ics = 1; settle = 0; cycles(40); ics = 0; settle = 0;
    oocs = 1; settle = 0; cycles(20); oocs = 0; settle = 0;
    oics = 1; settle = 0; cycles(2); main_en = 0; cycles(40);
    main_en = 1; cycles(2); oics = 0; settle = 0;
    cfg(2, 50, 1'b0);
    loopback(1'b0, 1'b1); cycles(40);
    loopback(1'b1, 1'b1); cycles(40);
    loopback(1'b1, 1'b0); loopback(1'b0, 1'b0); cycles(20);
    settle = 0; sh_ctrl = '0;
    rst = 1; cycles(3); rst = 0;
    rst_seen = 1; settle = 0;
    cycles(40);
    rst_seen = 0;

    // ---- BUSY BIT: FRAME reset ----
    cycles(2 * RT);
    for (int i = 0; i < 50; i++) begin
      chk(teo == 1'b0 && fstate == FR_INIT, "FRAME held low during reset");
      n_reset++;
      cycles(1);
    end
    chk(n_frames == 0, "no FRAME during reset");

    // ---- FRAME creation: B<15:1> of lane 0 requested, 16-bit FRAME ----
    for (int i = 15; i >= 1; i--) req(i, 1'b1);
    cycles(2);
    fc_in = 0;
    cycles(3);
    chk(fstate == FR_CREATE, "creating a FRAME");
    cycles(40);
    chk(fstate == FR_PASS && n_frames == 1, "one FRAME created");
    chk(last_bits == 64'h0000_0000_0000_FFFE, $sformatf("master grabbed B<15:1>: %h", last_bits));
    n_create++;
    check_frames = 1;
    cycles(2 * RT);
    chk(n_frames == 3 && n_bad_len == 0 && n_bad_period == 0, "FRAME circulates");
    giro_read(5, v);
    chk(v == 1'b1, "GIRO shows B<5> grabbed"); n_giro++;
    for (int i = 15; i >= 1; i--) req(i, 1'b0);
    cycles(RT + 10);
    chk(last_bits == '0, $sformatf("B<15:1> released: %h", last_bits));
    n_release++;
    giro_read(5, v);
    chk(v == 1'b0, "GIRO shows B<5> released"); n_giro++;

    // ---- grab on lanes 2 and 3 ----
    req(2*16 + 5, 1'b1); req(3*16 + 0, 1'b1);
    cycles(2 * RT);
    chk(last_bits == 64'h0001_0020_0000_0000, $sformatf("grab lane 2 / 3: %h", last_bits));
    giro_read(2*16 + 5, v); chk(v, "GIRO lane 2 bit 5"); n_giro++;
    giro_read(3*16 + 0, v); chk(v, "GIRO lane 3 bit 0"); n_grab++; n_giro++;
    giro_read(3*16 + 1, v); chk(!v, "GIRO lane 3 bit 1"); n_giro++;

    // ---- contention with the other node ----
    other_req[1*16 + 9] = 1'b1;
    cycles(2 * RT);
    req(1*16 + 9, 1'b1);
    cycles(2 * RT);
    giro_read(1*16 + 9, v);
    chk(!v, "processor held by the other node is not grabbed"); n_denied++; n_giro++;
    chk(last_bits[1*16 + 9], "busy bit stays set by the other node");
    other_req[1*16 + 9] = 1'b0;
    cycles(3 * RT);
    giro_read(1*16 + 9, v);
    chk(v, "grabbed after the other node released"); n_grab++; n_giro++;
    chk(other_grab[1*16 + 9] == 1'b0, "other node does not hold it");

    // ---- spare FRAME and BUSY BIT lines ----
    @(negedge clk); #3;
    tis = 1; bis = 1; spare_mode = 1;
    cycles(3 * RT);
    chk(n_bad_len == 0 && n_bad_period == 0, "FRAME intact on the spare lines");
    chk(last_bits == 64'h0001_0020_0200_0000, $sformatf("busy bits on spare lines: %h", last_bits));
    n_spare++;
    req(2*16 + 5, 1'b0); req(3*16 + 0, 1'b0); req(1*16 + 9, 1'b0);
    cycles(2 * RT);
    chk(last_bits == '0, $sformatf("all released on spare lines: %h", last_bits));
    n_release++;
    chk(n_bad_len == 0 && n_bad_period == 0, "FRAME circulated unchanged");
    tbps = 1;
    req(0*16 + 12, 1'b1);
    cycles(2 * RT);
    chk(n_bad_len == 0 && n_bad_period == 0, "FRAME intact with falling-edge capture");
    chk(last_bits == 64'h0000_0000_0000_1000, $sformatf("grab with falling-edge capture: %h", last_bits));
    n_tbps++;
    req(0*16 + 12, 1'b0);
    cycles(2 * RT);
    chk(last_bits == '0, "released with falling-edge capture");
    tbps = 0;
    for (int i = 0; i < 2 * RT; i++) begin
      if (teo) n_teo++;
      cycles(1);
    end
    chk(n_teo == 2 * BB_BITS, $sformatf("board sees the FRAME: %0d", n_teo));

    $display("mechanisms: flow %0d insert %0d chain %0d path->port %0d lb_port %0d lb_path0 %0d",
             n_flow, n_insert, n_chain, n_p2p, n_lbport, n_lbpath0);
    $display("            cps %0d ics %0d oics %0d reset-clear %0d out-clocks %0d",
             n_cps1, n_ics1, n_oics, n_rstclr, n_oclk);
    $display("            frame-reset %0d create %0d frames %0d grab %0d release %0d denied %0d giro %0d spare %0d tbps %0d teo %0d",
             n_reset, n_create, n_frames, n_grab, n_release, n_denied, n_giro, n_spare, n_tbps, n_teo);
    chk(n_flow > 0, "flow-through happened");
    chk(n_insert > 0, "port insertion happened");
    chk(n_chain > 0, "several ports on one path happened");
    chk(n_p2p > 0, "path to port happened");
    chk(n_lbport > 0, "port loop-back happened");
    chk(n_lbpath0 > 0, "path 0 loop-back happened");
    chk(n_cps1 > 0, "180 degree capture happened");
    chk(n_ics1 > 0, "electrical internal clock happened");
    chk(n_oics > 0, "spare optical clock happened");
    chk(n_rstclr > 0, "reset clear happened");
    chk(n_oclk > 0, "output clocks seen");
    chk(n_reset > 0 && n_create > 0 && n_grab > 0 && n_release > 0, "BUSY BIT operations happened");
    chk(n_tbps > 0, "falling-edge capture of the FRAME/BUSY lines happened");
    chk(n_denied > 0 && n_giro > 0 && n_spare > 0 && n_teo > 0, "BUSY BIT denial, GIRO, spare lines, board FRAME happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
