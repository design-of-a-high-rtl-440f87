// Self-checking test of the delay_inverter model: for each of the five taps,
// the rising and falling delays equal i*TAU_BUF + TAU_TG + TAU_NOR and the
// output is inverted; P.D. forces the output low; a pulse shorter than the
// delay still passes (transport delay).
`timescale 1ps/1ps
module tb_delay_inverter;
  localparam int TB = 18, TG = 8, TN = 5;
  logic a, pd, b_i;
  logic [5:1] sel;
  int checks = 0, failures = 0;
  time t0;
  delay_inverter #(.N_TAPS(5), .TAU_BUF_PS(TB), .TAU_TG_PS(TG), .TAU_NOR_PS(TN)) dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = 0; pd = 0; sel = 5'b00100; #500;
    chk(b_i == 1, "idle output is NOT a");
    for (int i = 1; i <= 5; i++) begin
      sel = 5'(1 << (i-1)); #500;
      a = 1; t0 = $time; @(negedge b_i);
      chk($time - t0 == i*TB + TG + TN, $sformatf("fall delay tap %0d = %0t", i, $time - t0));
      #300;
      a = 0; t0 = $time; @(posedge b_i);
      chk($time - t0 == i*TB + TG + TN, $sformatf("rise delay tap %0d = %0t", i, $time - t0));
      #300;
    end
    sel = 5'b00100; #300;
    pd = 1; #20; chk(b_i == 0, "P.D. forces low");
    a = 1; #200; a = 0; #200; chk(b_i == 0, "P.D. holds low");
    pd = 0; #20; chk(b_i == 1, "P.D. released");
    a = 1; #20; a = 0; t0 = $time;  // 20 ps pulse
    @(negedge b_i); chk($time - t0 == 3*TB + TG + TN - 20, "short pulse passes");
    @(posedge b_i); chk($time - t0 == 3*TB + TG + TN, "short pulse width kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
