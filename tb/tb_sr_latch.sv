// Self-checking test of sr_latch: set, hold, reset, hold and the forbidden
// S=R=1 state, against Table 2.1 style expectations.
`timescale 1ps/1ps
module tb_sr_latch;
  logic s, r, q, q_n;
  int checks = 0, failures = 0;
  sr_latch dut (.*);
  task automatic apply(input logic si, ri, input logic eq, eqn);
    s = si; r = ri; #10; checks++;
    if (q !== eq || q_n !== eqn) begin
      failures++; $display("FAIL s=%b r=%b q=%b q_n=%b exp %b %b", si, ri, q, q_n, eq, eqn);
    end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    apply(0, 1, 0, 1);  // reset
    apply(0, 0, 0, 1);  // hold 0
    apply(1, 0, 1, 0);  // set
    apply(0, 0, 1, 0);  // hold 1
    apply(1, 0, 1, 0);  // set again
    apply(0, 1, 0, 1);  // reset
    apply(0, 0, 0, 1);  // hold 0
    apply(1, 1, 0, 0);  // forbidden: both NOR outputs low
    apply(0, 1, 0, 1);
    for (int i = 0; i < 20; i++) begin  // random set/reset/hold walk
      logic si, ri, expq;
      si = 1'($urandom); ri = si ? 1'b0 : 1'($urandom);
      expq = ri ? 1'b0 : (si ? 1'b1 : q);
      apply(si, ri, expq, ~expq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
