// Testbench for clk_select: drives every combination of the three selects
// with independent random levels on the three clock inputs and checks each
// output against the selection rules of the clock selection block.
module tb_clk_select;
  logic eclk, om, os, oics, ics, oocs;
  logic oclk, iclk, ooclk, eoclk;
  logic e_oclk, e_iclk;
  int checks = 0, failures = 0;

  clk_select dut (
    .eclk(eclk), .oclk_main(om), .oclk_spare(os), .oics(oics), .ics(ics), .oocs(oocs),
    .oclk(oclk), .iclk(iclk), .ooclk(ooclk), .eoclk(eoclk)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      {oics, ics, oocs} = 3'(k);
      {eclk, om, os} = 3'($urandom);
      #1;
      e_oclk = (oics == 1'b1) ? os : om;
      e_iclk = (ics == 1'b1) ? eclk : e_oclk;
      checks += 4;
      if (oclk !== e_oclk)  begin failures++; $display("FAIL oclk");  end
      if (iclk !== e_iclk)  begin failures++; $display("FAIL iclk");  end
      if (ooclk !== ((oocs == 1'b1) ? e_iclk : eclk)) begin failures++; $display("FAIL ooclk"); end
      if (eoclk !== e_iclk) begin failures++; $display("FAIL eoclk"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
