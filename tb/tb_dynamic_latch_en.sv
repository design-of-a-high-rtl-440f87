// Self-checking test of dynamic_latch_en: reset state, positive and negative
// decisions while enabled, no decision while disabled, decision kept against
// later input changes and re-enabling, both inputs high (metastable) resolved
// as positive, reset clears.
`timescale 1ps/1ps
module tb_dynamic_latch_en;
  logic en_n, in_p, in_n, rst_dac_n, ctrl_p, ctrl_n;
  int checks = 0, failures = 0;
  dynamic_latch_en dut (.*);
  task automatic chk(input logic ep, en, input string what);
    #10; checks++;
    if (ctrl_p !== ep || ctrl_n !== en) begin
      failures++; $display("FAIL %s: ctrl_p=%b ctrl_n=%b exp %b %b", what, ctrl_p, ctrl_n, ep, en);
    end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    en_n = 1; in_p = 0; in_n = 0; rst_dac_n = 1; #1; rst_dac_n = 0; chk(1, 1, "reset");
    rst_dac_n = 1;                chk(1, 1, "idle");
    in_n = 1;                     chk(1, 1, "disabled: ignored");
    in_n = 0; en_n = 0;           chk(1, 1, "enabled, comparator in reset");
    in_n = 1;                     chk(0, 1, "positive decision");
    in_n = 0; in_p = 1;           chk(0, 1, "kept after input change");
    in_p = 0; en_n = 1; #5; en_n = 0; in_p = 1; chk(0, 1, "kept after re-enable");
    in_p = 0; en_n = 1; rst_dac_n = 0; chk(1, 1, "DAC reset");
    rst_dac_n = 1; en_n = 0;      chk(1, 1, "enabled again");
    in_p = 1;                     chk(1, 0, "negative decision");
    in_p = 0; in_n = 1;           chk(1, 0, "kept");
    in_n = 0; rst_dac_n = 0;      chk(1, 1, "reset");
    rst_dac_n = 1;                chk(1, 1, "idle");
    in_p = 1; in_n = 1;           chk(0, 1, "both inputs high: positive");
    in_p = 0; in_n = 0; en_n = 1; rst_dac_n = 0; chk(1, 1, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
