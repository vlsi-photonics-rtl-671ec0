// Testbench for dp_ctrl_regs at its full size (4 ports x 64 paths): random
// loads of single switch latches and of the two loop-back latches through the
// EIOO / SLL / DPCRL / dp_val interface, including cycles without a strobe,
// and a RESET in the middle. A shadow copy predicts every register bit.
module tb_dp_ctrl_regs;
  localparam int NPATH = 64, NPORT = 4;
  logic clk = 1'b0, rst, sll, dpcrl, dp_val;
  logic [7:0] eioo;
  logic [NPORT-1:0][NPATH-1:0] ctrl, m_ctrl;
  logic lb_port, lb_path0, m_lbp, m_lb0;
  int checks = 0, failures = 0;

  dp_ctrl_regs #(.NPATH(NPATH), .NPORT(NPORT)) dut (
    .clk(clk), .rst(rst), .eioo(eioo), .sll(sll), .dpcrl(dpcrl), .dp_val(dp_val),
    .ctrl(ctrl), .lb_port(lb_port), .lb_path0(lb_path0)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; sll = 0; dpcrl = 0; dp_val = 0; eioo = 0;
    @(posedge clk); #1;
    m_ctrl = '0; m_lbp = 0; m_lb0 = 0;
    for (int k = 0; k < 3000; k++) begin
      rst = (k == 1500);
      eioo = 8'($urandom);
      sll = ($urandom % 8) == 0;
      dpcrl = ($urandom % 3) != 0;
      dp_val = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (rst) begin
        m_ctrl = '0; m_lbp = 0; m_lb0 = 0;
      end else if (dpcrl) begin
        if (sll) begin
          if (eioo[0]) m_lb0 = dp_val; else m_lbp = dp_val;
        end else m_ctrl[eioo[7:6]][eioo[5:0]] = dp_val;
      end
      checks++;
      if (ctrl !== m_ctrl || lb_port !== m_lbp || lb_path0 !== m_lb0) begin
        failures++; $display("FAIL k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
