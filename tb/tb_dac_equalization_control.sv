// Self-checking test of dac_equalization_control: exhaustive truth table,
// then the order of events at the end of a conversion: EoC rises with endbar
// low (no equalization), endbar rises after the DAC reset (equalization on),
// sampling starts (equalization off at once).
`timescale 1ps/1ps
module tb_dac_equalization_control;
  logic eoc, end_n, clk_b, equ, equ_n;
  int checks = 0, failures = 0;
  dac_equalization_control dut (.*);
  task automatic chk(input logic exp_equ, input string what);
    #10; checks++;
    if (equ !== exp_equ || equ_n !== !exp_equ) begin
      failures++; $display("FAIL %s: equ=%b equ_n=%b", what, equ, equ_n);
    end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {eoc, end_n, clk_b} = 3'(v);
      chk(v == 7, "table");
    end
    clk_b = 1; eoc = 0; end_n = 1; chk(0, "converting");
    eoc = 1; end_n = 0;            chk(0, "last decision, DAC not reset");
    end_n = 1;                     chk(1, "DAC reset done");
    clk_b = 0;                     chk(0, "sampling");
    eoc = 0;                       chk(0, "EoC cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
