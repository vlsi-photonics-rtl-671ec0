// Workload testbench: a full BUSY BIT ring of 16 nodes with 4 processors each
// (64 processors, 64 busy bits on 4 lanes of 16), built from 16
// busy_bit_unit instances at their default size, every node's FRAME and
// BUSY BIT outputs wired to the next node's inputs.
//
// Node 0 is the master: it resets the ring and creates a 16-bit FRAME by
// requesting its lane 0 bits 15..1, then releases them. The test then
//   1. measures the grab latency of single, uncontended requests placed at
//      random times by random nodes, and checks it against the bound
//      (nodes x node latency + FRAME length + host register delay), and
//      that the FRAME comes round once every 16 x 5 cycles;
//   2. runs random traffic: every node requests random processors, holds
//      each one it gets for a random time and releases it. From each node's
//      grab register (read after its FRAME has passed) the testbench
//      follows every grab and release in time order and checks that no
//      processor is ever held by two nodes and that only requested
//      processors are grabbed;
//   3. stops new requests and checks that every request is granted and the
//      ring returns to all processors free.
module tb_busy_ring
  import sw_pkg::*;
;
  localparam int NN = 16, LANES = 4, NB = 16, NP = LANES * NB;
  localparam int HOP = 5, RT = NN * HOP;
  localparam int MAXLAT = RT + NB + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst;
  logic ms0, fc0;
  logic frame_line [NN];
  logic [LANES-1:0] busy_line [NN];
  logic int_frame [NN];
  logic [NP-1:0] gstat [NN];
  logic [5:0] bbi [NN];
  logic bbs [NN], bbr [NN];
  frame_state_e fstate [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    logic giro_unused;
    busy_bit_unit u_node (
      .oclk(clk), .iclk(clk), .rst(rst), .in_inv(1'b0), .tbps(1'b0),
      .ms(n == 0 ? ms0 : 1'b0), .fc_in(n == 0 ? fc0 : 1'b0),
      .frame_in(frame_line[(n + NN - 1) % NN]), .busy_in(busy_line[(n + NN - 1) % NN]),
      .bbi(bbi[n]), .bbs(bbs[n]), .bbr(bbr[n]), .grab_set(1'b0), .grab_clr(1'b0),
      .lgi_n(1'b0), .gis(6'd0),
      .frame_out(frame_line[n]), .busy_out(busy_line[n]), .int_frame(int_frame[n]),
      .gstat(gstat[n]), .giro(giro_unused), .fstate(fstate[n])
    );
  end

  int checks = 0, failures = 0, cyc = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- ownership tracking ----------------
  int owner [NP];
  logic [NP-1:0] snap [NN];
  logic [NP-1:0] wanted [NN];   // request bits the host has set
  int fall_cnt [NN];
  int n_grabs = 0, n_releases = 0;
  int last_pass = -1, n_period_bad = 0, n_passes = 0;
  logic fr0_q = 1'b0;

  initial begin
    for (int i = 0; i < NP; i++) owner[i] = -1;
    for (int n = 0; n < NN; n++) begin snap[n] = '0; wanted[n] = '0; fall_cnt[n] = 0; end
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    if (!rst) begin
      // FRAME period seen by the master
      if (int_frame[0] && !fr0_q) begin
        if (last_pass >= 0 && cyc - last_pass != RT) n_period_bad++;
        last_pass = cyc;
        n_passes++;
      end
      fr0_q = int_frame[0];
      for (int n = 0; n < NN; n++) begin
        if (int_frame[n]) fall_cnt[n] = 3;
        else if (fall_cnt[n] > 0) begin
          fall_cnt[n]--;
          if (fall_cnt[n] == 1) begin
            for (int i = 0; i < NP; i++) begin
              if (snap[n][i] && !gstat[n][i]) begin
                chk(owner[i] == n, $sformatf("node %0d released processor %0d it did not hold", n, i));
                owner[i] = -1;
                n_releases++;
              end
            end
            for (int i = 0; i < NP; i++) begin
              if (!snap[n][i] && gstat[n][i]) begin
                chk(owner[i] == -1, $sformatf("node %0d grabbed processor %0d held by node %0d", n, i, owner[i]));
                chk(wanted[n][i], $sformatf("node %0d grabbed processor %0d it did not request", n, i));
                owner[i] = n;
                n_grabs++;
              end
            end
            snap[n] = gstat[n];
          end
        end
      end
    end
  end

  // ---------------- host interfaces ----------------
  // Host operations are issued at the falling edge and taken at the next
  // rising edge; one per node per cycle.
  task automatic host(input int n, input int i, input logic set);
    @(negedge clk);
    bbi[n] = 6'(i);
    if (set) begin bbs[n] = 1; wanted[n][i] = 1; end
    else begin bbr[n] = 1; wanted[n][i] = 0; end
    @(negedge clk);
    bbs[n] = 0; bbr[n] = 0;
  endtask

  task automatic wait_cycles(input int c);
    repeat (c) @(posedge clk);
  endtask

  int lat, max_lat = 0, t0, n_lat = 0;
  int hold_until [NN][NP];
  int pending, stop_gen, n_contended = 0;
  logic [NP-1:0] any_held;

  initial begin
    rst = 1; ms0 = 1; fc0 = 1;
    for (int n = 0; n < NN; n++) begin bbi[n] = '0; bbs[n] = 0; bbr[n] = 0; end
    wait_cycles(5);
    @(negedge clk) rst = 0;

    // ---- FRAME reset and creation by the master ----
    wait_cycles(2 * RT);
    chk(n_passes == 0, "no FRAME while the master resets the ring");
    for (int i = NB - 1; i >= 1; i--) host(0, i, 1'b1);
    @(negedge clk) fc0 = 0;
    wait_cycles(RT + NB + 10);
    for (int i = NB - 1; i >= 1; i--) chk(owner[i] == 0, "master holds its creation bits");
    for (int i = NB - 1; i >= 1; i--) host(0, i, 1'b0);
    wait_cycles(2 * RT);
    for (int i = 0; i < NP; i++) chk(owner[i] == -1, "ring free after the master released");
    chk(n_passes >= 3 && n_period_bad == 0, $sformatf("FRAME period %0d cycles", RT));

    // ---- 1. uncontended grab latency ----
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(NN - 1);
      automatic int i = $urandom_range(NP - 1);
      wait_cycles($urandom_range(RT));
      t0 = cyc;
      host(n, i, 1'b1);
      while (!gstat[n][i] && cyc - t0 < 3 * RT) @(posedge clk);
      #2;
      lat = cyc - t0;
      if (lat > max_lat) max_lat = lat;
      n_lat++;
      chk(lat <= MAXLAT, $sformatf("grab latency %0d > %0d", lat, MAXLAT));
      host(n, i, 1'b0);
      wait_cycles(2 * RT);
    end
    $display("uncontended grab latency: max %0d cycles over %0d requests (bound %0d)", max_lat, n_lat, MAXLAT);

    // ---- 2. random traffic ----
    for (int n = 0; n < NN; n++) for (int i = 0; i < NP; i++) hold_until[n][i] = -1;
    stop_gen = cyc + 6000;
    fork
      for (int n0 = 0; n0 < NN; n0++) begin
        fork
          automatic int n = n0;
          begin
            while (1) begin
              automatic int i = $urandom_range(NP - 1);
              @(negedge clk);
              if (cyc < stop_gen && !wanted[n][i] && $countones(wanted[n]) < 3 && $urandom_range(39) == 0) begin
                if (owner[i] != -1) n_contended++;
                host(n, i, 1'b1);
              end else begin
                // release one processor whose holding time is over
                for (int j = 0; j < NP; j++) begin
                  if (wanted[n][j] && snap[n][j]) begin
                    if (hold_until[n][j] < 0) hold_until[n][j] = cyc + $urandom_range(50, 300);
                    else if (cyc >= hold_until[n][j]) begin
                      hold_until[n][j] = -1;
                      host(n, j, 1'b0);
                      break;
                    end
                  end
                end
              end
              if (cyc >= stop_gen && wanted[n] == '0) break;
            end
          end
        join_none
      end
    join_none
    wait_cycles(6000);
    // ---- 3. drain ----
    t0 = cyc;
    do begin
      wait_cycles(RT);
      pending = 0;
      for (int n = 0; n < NN; n++) pending += $countones(wanted[n]);
    end while (pending != 0 && cyc - t0 < 40000);
    chk(pending == 0, $sformatf("%0d requests never granted and released", pending));
    wait_cycles(3 * RT);
    any_held = '0;
    for (int i = 0; i < NP; i++) if (owner[i] != -1) any_held[i] = 1;
    chk(any_held == '0, "all processors free at the end");
    for (int n = 0; n < NN; n++) chk(gstat[n] == '0, "grab registers clear at the end");
    chk(n_period_bad == 0, "FRAME period constant");
    chk(n_grabs > 100 && n_grabs == n_releases, $sformatf("grabs %0d releases %0d", n_grabs, n_releases));
    chk(n_contended > 0, "some requests found their processor held");
    $display("traffic: %0d grabs, %0d releases, %0d requests for a held processor, %0d FRAME passes",
             n_grabs, n_releases, n_contended, n_passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
