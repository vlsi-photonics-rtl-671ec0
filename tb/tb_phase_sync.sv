// Testbench for phase_sync. Data launched just after a rising edge must be
// on q one cycle later with either phase select. Data that changes just
// after the falling edge shows the 180 degree capture: with sel_180 = 0 the
// next rising edge takes the new value, with sel_180 = 1 the value captured
// on the falling edge (the old one) is passed on.
module tb_phase_sync;
  localparam int W = 8;
  logic clk = 1'b0;
  logic sel;
  logic [W-1:0] d, q, v_old, v_new;
  int checks = 0, failures = 0;

  phase_sync #(.W(W)) dut (.clk(clk), .sel_180(sel), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h sel=%0d", what, q, exp, sel);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    sel = 1'b0;
    for (int s = 0; s < 2; s++) begin
      sel = s[0];
      for (int k = 0; k < 50; k++) begin
        @(posedge clk); #1 v_new = W'($urandom); d = v_new;
        @(posedge clk); #1 check(v_new, "launch after rising edge");
      end
      for (int k = 0; k < 50; k++) begin
        @(posedge clk); #1 v_old = W'($urandom); d = v_old;
        @(negedge clk); #1 v_new = ~v_old; d = v_new;
        @(posedge clk); #1 check(sel ? v_old : v_new, "change after falling edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
