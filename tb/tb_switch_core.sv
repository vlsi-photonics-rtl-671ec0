// Testbench for switch_core at 8 paths x 4 ports x 6 bits. New random path
// words, port words, switch controls and loop-back selects are applied every
// cycle. A reference model (last selecting port in the A..D chain wins, else
// flow-through; PATH n to PORT n with the PORT B loop-backs) predicts each
// output from the inputs applied two cycles and the controls applied one
// cycle earlier, which checks the two retiming stages. Run with both optical
// capture phases.
module tb_switch_core;
  localparam int NPATH = 8, NPORT = 4, DW = 6, K = 300;
  logic clk = 1'b0, cps;
  logic [NPATH-1:0][DW-1:0] path_in, path_out;
  logic [NPORT-1:0][DW-1:0] port_in, port_out;
  logic [NPORT-1:0][NPATH-1:0] ctrl;
  logic lb_port, lb_path0;
  int checks = 0, failures = 0;
  int n_insert = 0, n_flow = 0, n_lb_port = 0, n_lb_path = 0;

  logic [NPATH-1:0][DW-1:0] h_path [K];
  logic [NPORT-1:0][DW-1:0] h_port [K];
  logic [NPORT-1:0][NPATH-1:0] h_ctrl [K];
  logic h_lbp [K], h_lb0 [K];

  switch_core #(.NPATH(NPATH), .NPORT(NPORT), .DW(DW)) dut (
    .clk(clk), .cps(cps), .path_in(path_in), .port_in(port_in), .ctrl(ctrl),
    .lb_port(lb_port), .lb_path0(lb_path0), .path_out(path_out), .port_out(port_out)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic phase);
    logic [DW-1:0] e;
    cps = phase;
    for (int k = 0; k < K; k++) begin
      @(posedge clk); #1;
      // outputs now reflect data applied before edge k-1 and controls before edge k
      if (k >= 2) begin
        for (int j = 0; j < NPATH; j++) begin
          e = h_path[k-2][j];
          for (int p = 0; p < NPORT; p++) if (h_ctrl[k-1][p][j]) e = h_port[k-2][p];
          if (h_ctrl[k-1][0][j] | h_ctrl[k-1][1][j] | h_ctrl[k-1][2][j] | h_ctrl[k-1][3][j]) n_insert++;
          else n_flow++;
          checks++;
          if (path_out[j] !== e) begin
            failures++; $display("FAIL path %0d k=%0d got %h exp %h", j, k, path_out[j], e);
          end
        end
        for (int p = 0; p < NPORT; p++) begin
          e = h_path[k-2][p];
          if (p == 1 && h_lb0[k-1]) begin e = h_path[k-2][0]; n_lb_path++; end
          else if (p == 1 && h_lbp[k-1]) begin e = h_port[k-2][0]; n_lb_port++; end
          checks++;
          if (port_out[p] !== e) begin
            failures++; $display("FAIL port %0d k=%0d got %h exp %h", p, k, port_out[p], e);
          end
        end
      end
      for (int j = 0; j < NPATH; j++) path_in[j] = DW'($urandom);
      for (int p = 0; p < NPORT; p++) port_in[p] = DW'($urandom);
      for (int p = 0; p < NPORT; p++) ctrl[p] = NPATH'($urandom & $urandom);
      lb_port = ($urandom % 4) == 0;
      lb_path0 = ($urandom % 4) == 0;
      h_path[k] = path_in; h_port[k] = port_in; h_ctrl[k] = ctrl;
      h_lbp[k] = lb_port; h_lb0[k] = lb_path0;
    end
  endtask

  initial begin
    path_in = '0; port_in = '0; ctrl = '0; lb_port = 0; lb_path0 = 0; cps = 0;
    run(1'b0);
    run(1'b1);
    if (n_insert == 0 || n_flow == 0 || n_lb_port == 0 || n_lb_path == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("inserted=%0d flow_through=%0d lb_port=%0d lb_path0=%0d", n_insert, n_flow, n_lb_port, n_lb_path);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
