// Self-checking test of reset_mode_control: all eight input combinations
// against the gate equations Start = CLKbar & resetbar, RST_DAC = Start & !EoC.
`timescale 1ps/1ps
module tb_reset_mode_control;
  logic clk_b, reset_n, eoc, start, start_n, rst_dac_n;
  int checks = 0, failures = 0;
  reset_mode_control dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {clk_b, reset_n, eoc} = 3'(v);
      #10;
      checks++;
      if (start !== (clk_b && reset_n) || start_n !== !(clk_b && reset_n) ||
          rst_dac_n !== (clk_b && reset_n && !eoc)) begin
        failures++; $display("FAIL v=%0d start=%b start_n=%b rst_dac_n=%b", v, start, start_n, rst_dac_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
