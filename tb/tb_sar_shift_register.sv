// Self-checking test of sar_shift_register: set by Start, one shift per
// falling edge of valid (none on the rising edge), thermometer code of zeros
// filling from P<1>, set again in the middle of a conversion.
`timescale 1ps/1ps
module tb_sar_shift_register;
  localparam int N = 13;
  logic valid, start;
  logic [N:1] p, step;
  int checks = 0, failures = 0;
  sar_shift_register #(.N_STEPS(N)) dut (.*);
  function automatic logic [N:1] therm(input int k);  // P after k shifts
    logic [N:1] v = '1;
    for (int i = 1; i <= k && i <= N; i++) v[i] = 1'b0;
    return v;
  endfunction
  task automatic chk(input logic [N:1] e, input string what);
    checks++;
    if (p !== e || step !== ~e) begin
      failures++; $display("FAIL %s: p=%b exp=%b step=%b", what, p, e, step);
    end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    valid = 0; start = 1; #1; start = 0; #20; chk('1, "set");
    valid = 1; #10; valid = 0; #10; chk('1, "no shift while set");
    start = 1; #10; chk('1, "released");
    for (int k = 1; k <= N + 2; k++) begin
      valid = 1; #10; chk(therm(k-1), "rising edge: no shift");
      valid = 0; #10; chk(therm(k), "falling edge: shift");
    end
    start = 0; #10; chk('1, "set again");
    start = 1; #10;
    for (int k = 1; k <= 5; k++) begin valid = 1; #7; valid = 0; #7; end
    chk(therm(5), "five shifts");
    start = 0; #5; chk('1, "set mid conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
