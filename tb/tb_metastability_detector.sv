// Self-checking test of metastability_detector (window 100 ps at tap 3):
// a decision made inside the window leaves MET low, no decision or two sagging
// outputs raise MET at the end of the window, and the comparator reset clears
// it. The window length of every tap is measured.
`timescale 1ps/1ps
module tb_metastability_detector;
  localparam int TB = 29, TG = 8, TN = 5;
  logic rst_cmp_n, cmp_p, cmp_n, met;
  logic [5:1] tcmp_sel;
  int checks = 0, failures = 0;
  time t0;
  metastability_detector #(.N_DELAY(5), .TAU_BUF_PS(TB), .TAU_TG_PS(TG), .TAU_NOR_PS(TN)) dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst_cmp_n = 1; cmp_p = 1; cmp_n = 1; tcmp_sel = 5'b00100; #1; rst_cmp_n = 0; #500;
    chk(met == 0, "reset");
    for (int i = 1; i <= 5; i++) begin
      tcmp_sel = 5'(1 << (i-1)); #300;
      // normal decision after 40 ps
      rst_cmp_n = 1; #40; cmp_n = 0; #200;
      chk(met == 0, $sformatf("decision in window, tap %0d", i));
      rst_cmp_n = 0; #20; cmp_n = 1; #300;
      // no decision
      rst_cmp_n = 1; t0 = $time; @(posedge met);
      chk($time - t0 == i*TB + TG + TN, $sformatf("window tap %0d = %0t", i, $time - t0));
      rst_cmp_n = 0; #1; chk(met == 0, "cleared by comparator reset");
      #300;
    end
    tcmp_sel = 5'b00100; #300;
    rst_cmp_n = 1; #60; cmp_p = 0; cmp_n = 0; #100;   // both outputs sag
    chk(met == 1, "both outputs low is metastable");
    rst_cmp_n = 0; cmp_p = 1; cmp_n = 1; #10; chk(met == 0, "cleared");
    #300;
    rst_cmp_n = 1; #99; cmp_p = 0; #50; chk(met == 0, "decision just inside 100 ps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
