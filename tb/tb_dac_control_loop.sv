// Self-checking test of dac_control_loop: random conversions of 13 decisions.
// A simple comparator stand-in pulls CMP_N (positive) or CMP_P (negative) low,
// then returns both high (reset). Checks that exactly the expected latch is
// enabled while the comparator is reset, that each decision lands in its own
// latch before the shift, that earlier decisions are kept, the thermometer
// code of P and step, the forced negative decision on MET, and the DAC reset.
`timescale 1ps/1ps
module tb_dac_control_loop;
  localparam int N = 13;
  logic cmp_p, cmp_n, cmp_done, met, start, start_n, rst_dac_n;
  logic [N:1] ctrl_p, ctrl_n, p, step, en_n;
  int checks = 0, failures = 0, met_steps = 0;
  dac_control_loop #(.N_STEPS(N)) dut (.*);
  assign start_n  = ~start;
  assign cmp_done = ~(cmp_p & cmp_n) | met;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N:1] dec, use_met;
    cmp_p = 1; cmp_n = 1; met = 0; start = 1; rst_dac_n = 1; #1; start = 0; rst_dac_n = 0; #20;
    for (int conv = 0; conv < 40; conv++) begin
      dec = N'($urandom); use_met = (conv % 4 == 3) ? N'($urandom) & N'($urandom) : '0;
      start = 0; rst_dac_n = 0; #10;
      chk(en_n == '1 && p == '1 && ctrl_p == '1 && ctrl_n == '1, "sampling state");
      start = 1; rst_dac_n = 1; #10;
      for (int k = 1; k <= N; k++) begin
        chk(en_n == ~(N'(1) << (k-1)), $sformatf("only E<%0d> enabled", k));
        if (use_met[k]) begin met = 1; met_steps++; end
        else if (dec[k]) cmp_n = 0;
        else cmp_p = 0;
        #10;
        if (use_met[k]) chk(ctrl_n[k] == 0 && ctrl_p[k] == 1, "MET forces negative decision");
        else chk(ctrl_p[k] == !dec[k] && ctrl_n[k] == dec[k], $sformatf("decision %0d stored", k));
        chk(p == ~((N'(1) << (k-1)) - 1'b1) , "no shift before comparator reset");
        cmp_p = 1; cmp_n = 1; met = 0; #10;    // comparator reset: valid falls
        chk(p == ~((N'(1) << k) - 1'b1) && step == ~p, $sformatf("P after step %0d", k));
      end
      for (int k = 1; k <= N; k++)
        if (use_met[k]) chk(ctrl_p[k] && !ctrl_n[k], "MET decision kept");
        else chk(ctrl_p[k] == !dec[k] && ctrl_n[k] == dec[k], "decision kept to the end");
      chk(en_n == '1, "no latch enabled after the last step");
      rst_dac_n = 0; #10;
      chk(ctrl_p == '1 && ctrl_n == '1, "DAC reset");
    end
    chk(met_steps > 0, "MET path exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
