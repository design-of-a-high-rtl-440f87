// Self-checking test of comparator_reset_loop with a comparator stand-in
// that decides t_dec after its reset is released (decision plus the logic
// delay the gates would add; it must exceed the temporizer delay minus the
// comparator reset time for the reset to last one temporizer delay) and returns both outputs
// high T_RST after the reset is applied. Checks: held in reset while Startbar
// or EoC is high; released at the start of the conversion phase; each reset
// lasts one temporizer delay (i*18+13 ps, every tap); if the comparator resets
// slower than the temporizer, the pull-down wins and the reset lasts until the
// outputs are high; the end pulse resets at once; P.D. stops the loop; a
// metastable decision (both outputs sag) also resets the comparator.
`timescale 1ps/1ps
module tb_comparator_reset_loop;
  logic cmp_p, cmp_n, start_n, eoc, end_p, met, pd, rst_cmp, rst_cmp_n, node_a;
  logic [5:1] delay_sel;
  int checks = 0, failures = 0, t_rst = 20, t_dec = 90, n_dec = 0;
  bit meta = 0, dir = 0;
  time t_fall;
  comparator_reset_loop #(.N_DELAY(5), .TAU_BUF_PS(18), .TAU_TG_PS(8), .TAU_NOR_PS(5)) dut (.*);

  // comparator stand-in
  int tok = 0;
  always @(negedge rst_cmp) fork
    begin
      automatic int my = ++tok;
      #(t_dec);
      if (my == tok && !rst_cmp) begin
        n_dec++;
        if (meta) begin cmp_p = 0; cmp_n = 0; end
        else if (dir) cmp_n = 0; else cmp_p = 0;
        dir = ~dir;
      end
    end
  join_none
  always @(posedge rst_cmp) fork
    begin
      automatic int my = ++tok;
      #(t_rst);
      if (my == tok) begin cmp_p = 1; cmp_n = 1; end
    end
  join_none

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // measure one reset interval of node A
  task automatic reset_width(output time w);
    @(negedge node_a); t_fall = $time;
    @(posedge node_a); w = $time - t_fall;
  endtask

  initial begin
    #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    time w;
    cmp_p = 1; cmp_n = 1; start_n = 1; eoc = 0; end_p = 0; met = 0; pd = 0; delay_sel = 5'b00100;
    #500;
    chk(rst_cmp == 1 && rst_cmp_n == 0, "held in reset during sampling");
    chk(n_dec == 0, "no decision during sampling");
    for (int i = 1; i <= 5; i++) begin
      delay_sel = 5'(1 << (i-1)); #200;
      start_n = 0; #1;
      chk(rst_cmp == 0 && rst_cmp_n == 1, "released at conversion start");
      repeat (3) begin
        reset_width(w);
        chk(w == i*18 + 13, $sformatf("reset time tap %0d = %0t", i, w));
      end
      start_n = 1; #1;
      chk(rst_cmp == 1, "Startbar resets");
      #300;
    end
    // slow comparator reset: pull-down wins until outputs are high
    delay_sel = 5'b00001; t_rst = 60; #200;
    start_n = 0;
    reset_width(w);
    chk(w == 60, $sformatf("slow comparator reset honoured (%0t)", w));
    start_n = 1; t_rst = 20; delay_sel = 5'b00100; #300;
    // EoC holds the reset
    start_n = 0; #150; eoc = 1; #1; chk(rst_cmp == 1, "EoC resets");
    n_dec = 0; #500; chk(n_dec == 0 && rst_cmp == 1, "EoC holds reset");
    eoc = 0; start_n = 1; #300;
    // end pulse
    t_dec = 200; start_n = 0; #50; chk(rst_cmp == 0, "comparing");
    end_p = 1; #1; chk(rst_cmp == 1, "end pulse resets at once"); end_p = 0;
    start_n = 1; t_dec = 90; #400;
    // MET pulls node A down
    t_dec = 300; start_n = 0; #50; met = 1; #1; chk(rst_cmp == 1, "MET resets"); met = 0;
    start_n = 1; t_dec = 90; #400;
    // temporal power down
    start_n = 0; #100; pd = 1; #200;
    chk(rst_cmp == 1, "P.D. keeps the comparator reset");
    n_dec = 0; #500; chk(n_dec == 0, "no decision under P.D.");
    pd = 0; #300; chk(n_dec > 0, "loop restarts after P.D.");
    start_n = 1; #300;
    // metastable decision: both outputs low
    meta = 1; start_n = 0;
    reset_width(w);
    chk(w == 3*18 + 13, "metastable decision still resets and restarts");
    meta = 0; start_n = 1; #300;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
