// Testbench for grab_if_reg: random grab register contents, loads while the
// active-low enable is low, holds while it is high, and the selected bit on
// giro for every select value.
module tb_grab_if_reg;
  localparam int N = 16;
  logic clk = 1'b0, rst, lgi_n, giro;
  logic [N-1:0] grab, gstat, m;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  grab_if_reg #(.N(N)) dut (.clk(clk), .rst(rst), .lgi_n(lgi_n), .grab(grab), .sel(sel), .gstat(gstat), .giro(giro));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; lgi_n = 1; grab = '0; sel = 0;
    @(posedge clk); #1 rst = 0; m = '0;
    for (int k = 0; k < 400; k++) begin
      grab = N'($urandom);
      lgi_n = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (!lgi_n) m = grab;
      checks++;
      if (gstat !== m) begin failures++; $display("FAIL gstat k=%0d", k); end
      sel = 4'($urandom);
      #1;
      checks++;
      if (giro !== m[sel]) begin failures++; $display("FAIL giro k=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
