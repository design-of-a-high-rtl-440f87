// Operating points of the single SAR core, at the logic's default parameters:
// the constant 50 mV differential input used for the delay measurements
// (taken as 57 LSB: 0.9 V supply, +-0.9 V differential full scale, 11 bits,
// 0.879 mV per LSB), converted at 250 MS/s, 312.5 MS/s (2.5 GS/s over eight
// interleaved cores) and 375 MS/s with temporizer tap 3, and at 375 MS/s with
// taps 2 and 4 (the trims used for the slow and fast corners). Every
// conversion must finish inside the 7/8 of the period left after sampling
// and give the reference code. Finally the period is reduced in 50 ps steps
// to find the fastest rate at which this logic, with the behavioural
// comparator and temporizer delays, still completes a conversion.
`timescale 1ps/1ps
module tb_sar_workloads;
  localparam int N = 13;
  localparam int W [1:12] = '{512, 280, 152, 84, 46, 25, 14, 8, 4, 2, 1, 1};
  localparam int VIN = 56_883;   // 50 mV in milli-LSB

  logic clk = 0, reset_n = 1, cmp_p, cmp_n, pd = 0;
  logic [5:1] delay_sel = 5'b00100, tcmp_sel = 5'b00100;
  logic [N:1] noise_sel = 13'h0100;
  logic [4:1] bw_ini = 4'b0000, bw_fin = 4'b1111, bw;
  logic rst_cmp, rst_cmp_n, eoc, equ, equ_n, met;
  logic [N:1] ctrl_p, ctrl_n, step, dout, ref_bits;
  int vin = VIN, checks = 0, failures = 0, best_period = 0;
  bit ok;

  sar_logic dut (
    .clk(clk), .reset_n(reset_n), .cmp_p(cmp_p), .cmp_n(cmp_n), .pd(pd),
    .delay_sel(delay_sel), .tcmp_sel(tcmp_sel), .noise_sel(noise_sel),
    .bw_ini(bw_ini), .bw_fin(bw_fin), .rst_cmp(rst_cmp), .rst_cmp_n(rst_cmp_n),
    .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .bw(bw), .step(step), .dout(dout),
    .eoc(eoc), .equ(equ), .equ_n(equ_n), .met(met)
  );
  sar_adc_model ana (
    .clk(clk), .vin_mlsb(vin), .rst_cmp(rst_cmp), .rst_cmp_n(rst_cmp_n),
    .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .equ(equ), .bw(bw), .cmp_p(cmp_p), .cmp_n(cmp_n)
  );

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t (eoc=%b dout=%b ref=%b)", what, $time, eoc, dout, ref_bits); end
  endtask

  // One period: sampling for 1/8, conversion for 7/8. ok = finished in time
  // with the reference code.
  task automatic period_run(input int period);
    clk = 1; #(period / 8);
    clk = 0; #(period - period / 8 - 1);
    ok = eoc && dout == ref_bits;
  endtask

  initial begin
    #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int r = VIN;
    for (int k = 1; k <= N; k++) begin
      ref_bits[k] = r > 0;
      if (k <= 12) r += ref_bits[k] ? -W[k] * 1000 : W[k] * 1000;
    end
    // power-up: the DAC-control latches clear on a falling edge of RST_DAC,
    // which an arbitrary initial End-of-Conversion state may hide, so run
    // one throw-away sampling/conversion cycle before the first real one
    #1; clk = 1; #500; clk = 0; #2500; clk = 1; #2000;
    // 250, 312.5 and 375 MS/s at tap 3
    for (int i = 0; i < 3; i++) begin
      automatic int period = (i == 0) ? 4000 : (i == 1) ? 3200 : 2667;
      repeat (5) begin period_run(period); #1; chk(ok, $sformatf("conversion at period %0d ps", period)); end
    end
    // corner trims at 375 MS/s
    delay_sel = 5'b00010; repeat (5) begin period_run(2667); chk(ok, "375 MS/s, tap 2"); end
    delay_sel = 5'b01000; repeat (5) begin period_run(2667); chk(ok, "375 MS/s, tap 4"); end
    delay_sel = 5'b00100;
    // fastest rate with these model delays
    for (int period = 2667; period > 1000; period -= 50) begin
      period_run(period);
      period_run(period);
      if (!ok) break;
      best_period = period;
    end
    chk(best_period > 0 && best_period <= 2667, "at least 375 MS/s");
    chk(!ok, "a rate too high to finish was found");
    $display("INFO fastest period %0d ps (%0d MS/s) with tap 3", best_period, 1000000 / best_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
