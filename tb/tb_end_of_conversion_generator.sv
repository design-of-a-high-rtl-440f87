// Self-checking test of end_of_conversion_generator: 13 random decisions are
// placed on the DAC control signals, the last one starts the end pulse, the
// output register must hold the decisions, EoC must rise and stay high after
// the DAC reset ends the pulse, and clear only when sampling starts. An
// incomplete conversion must leave the previous result in place.
`timescale 1ps/1ps
module tb_end_of_conversion_generator;
  localparam int N = 13;
  logic [N:1] ctrl_p, ctrl_n, dout, dec, last;
  logic clk_b, end_p, end_n, eoc;
  int checks = 0, failures = 0;
  end_of_conversion_generator #(.N_STEPS(N)) dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ctrl_p = '1; ctrl_n = '1; clk_b = 0; #10;
    chk(eoc == 0 && end_p == 0 && end_n == 1, "sampling");
    for (int c = 0; c < 30; c++) begin
      dec = N'($urandom);
      clk_b = 0; ctrl_p = '1; ctrl_n = '1; #10;
      chk(eoc == 0, "EoC cleared by sampling");
      clk_b = 1; #10;
      if (c % 5 == 4) begin       // incomplete: the last step never happens
        for (int i = 1; i < N; i++) begin ctrl_p[i] = !dec[i]; ctrl_n[i] = dec[i]; #5; end
        chk(eoc == 0 && end_p == 0, "no EoC without the last decision");
        chk(dout == last, "result of incomplete conversion not stored");
        continue;
      end
      for (int i = 1; i <= N; i++) begin
        chk(end_p == 0, "no end before the last decision");
        ctrl_p[i] = !dec[i]; ctrl_n[i] = dec[i]; #5;
      end
      chk(end_p == 1 && end_n == 0 && eoc == 1, "end pulse and EoC");
      chk(dout == dec, "result stored");
      ctrl_p = '1; ctrl_n = '1; #5;   // DAC reset
      chk(end_p == 0 && end_n == 1 && eoc == 1, "pulse over, EoC held");
      last = dec;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
