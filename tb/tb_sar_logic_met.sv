// End-to-end test of sar_logic with the timing-window metastability detector
// fitted (USE_MET_DETECTOR = 1, 100 ps window at t_CMP<3>), otherwise like the
// default-parameter test: a comparator that has not decided within the window
// is overruled, MET forces a negative decision and the conversion goes on
// without waiting for the slow metastable decision. With the behavioural
// sampler/DAC/comparator model. Each conversion is checked against a
// reference successive-approximation run computed here: the 13 raw bits, the
// decoded value (within half an LSB, one LSB for metastable steps), the exact
// conversion time (sum of comparator times plus 12 comparator resets, each
// lasting the longer of the temporizer delay and the comparator's own 40 ps
// reset time), the
// noise-capacitor count used by every decision, DAC reset and equalization
// after EoC, and no equalization during sampling.
// Mechanisms exercised and counted: complete conversions at 375 MS/s, the
// noise-code switch, metastable decisions resolved through the NAND valid,
// temporizer taps 1..4 (taps 1 and 2 shorter than the 60 ps DAC settling
// time, which the model flags), temporal power down, external reset during a
// conversion, a clock too fast to finish (no result stored), and a slow clock.
`timescale 1ps/1ps
module tb_sar_logic_met;
  localparam int N = 13;
  localparam int W [1:12] = '{512, 280, 152, 84, 46, 25, 14, 8, 4, 2, 1, 1};
  localparam int T_CMP = 75, T_RST = 40, T_BW = 4, T_META = 250, META = 20, T_WIN = 3 * 29 + 13;

  logic clk = 0, reset_n = 1, cmp_p, cmp_n, pd = 0;
  logic [5:1] delay_sel = 5'b00100, tcmp_sel = 5'b00100;
  logic [N:1] noise_sel = 13'h1000;
  logic [4:1] bw_ini = 4'b0000, bw_fin = 4'b1111, bw;
  logic rst_cmp, rst_cmp_n, eoc, equ, equ_n, met;
  logic [N:1] ctrl_p, ctrl_n, step, dout, last_dout;
  int vin = 0;

  int checks = 0, failures = 0;
  int n_complete = 0, n_noise = 0, n_meta = 0, n_pd = 0, n_abort = 0, n_fast = 0,
      n_slow = 0, n_equ = 0, n_short_tap = 0;
  int tap_seen [1:5];
  int n_met_pulse = 0;
  always @(posedge met) n_met_pulse++;

  sar_logic #(.USE_MET_DETECTOR(1'b1)) dut (
    .clk(clk), .reset_n(reset_n), .cmp_p(cmp_p), .cmp_n(cmp_n), .pd(pd),
    .delay_sel(delay_sel), .tcmp_sel(tcmp_sel), .noise_sel(noise_sel),
    .bw_ini(bw_ini), .bw_fin(bw_fin), .rst_cmp(rst_cmp), .rst_cmp_n(rst_cmp_n),
    .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .bw(bw), .step(step), .dout(dout),
    .eoc(eoc), .equ(equ), .equ_n(equ_n), .met(met)
  );

  sar_adc_model #(.T_DEC_PS(40), .T_LOGIC_PS(35), .T_RST_PS(T_RST), .T_BW_PS(T_BW), .T_META_PS(T_META),
                  .META_MLSB(META)) ana (
    .clk(clk), .vin_mlsb(vin), .rst_cmp(rst_cmp), .rst_cmp_n(rst_cmp_n),
    .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .equ(equ), .bw(bw), .cmp_p(cmp_p), .cmp_n(cmp_n)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int onehot_idx(input logic [N:1] v);
    for (int i = 1; i <= N; i++) if (v[i]) return i;
    return 0;
  endfunction

  // Reference successive approximation: bits, metastable mask, bw count per
  // step, expected conversion time.
  task automatic reference(input int v, input int tap, output logic [N:1] bits,
                           output logic [N:1] meta, output int tconv,
                           output int bwc [1:N]);
    int r = v, ksel = onehot_idx(noise_sel);
    tconv = 12 * ((tap * 18 + 13 > T_RST) ? tap * 18 + 13 : T_RST);
    for (int k = 1; k <= N; k++) begin
      bwc[k] = (ksel < N && k > ksel) ? $countones(bw_fin) : $countones(bw_ini);
      meta[k] = (r < META) && (r > -META);
      bits[k] = meta[k] ? 1'b0 : (r > 0);
      tconv += meta[k] ? T_WIN : T_CMP + T_BW * bwc[k];
      if (k <= 12) r += bits[k] ? -W[k] * 1000 : W[k] * 1000;
    end
  endtask

  // One sampling + conversion period. mode: 0 normal, 1 P.D., 2 external reset
  task automatic convert(input int v, input int period, input int mode);
    logic [N:1] bits, meta;
    int tconv, bwc [1:N], est, tap, sv0;
    time t0, t_eoc;
    bit seen_eoc;
    tap = onehot_idx(delay_sel);
    reference(v, tap, bits, meta, tconv, bwc);
    vin = v;
    clk = 1; #(period / 8);
    last_dout = dout; sv0 = ana.settle_viol;
    clk = 0; t0 = $time; seen_eoc = 0;
    fork
      begin @(posedge eoc); t_eoc = $time; seen_eoc = 1; end
      begin
        if (mode == 1) begin pd = 1; #(period / 4); pd = 0; end
        if (mode == 2) begin #(period / 4); reset_n = 0; #20; reset_n = 1; end
      end
    join_none
    #(period - period / 8 - 5);
    disable fork;
    if (mode == 0 && tconv < period - period / 8 - 40) begin
      chk(seen_eoc && eoc, $sformatf("conversion of %0d complete", v));
      chk(dout == bits, $sformatf("raw bits %b, expected %b", dout, bits));
      chk(t_eoc - t0 == tconv, $sformatf("conversion time %0t, expected %0d", t_eoc - t0, tconv));
      chk(ana.n_dec == N - $countones(meta), "comparator decisions");
      est = (dout[N] ? 500 : -500);
      for (int k = 1; k <= 12; k++) est += dout[k] ? W[k] * 1000 : -W[k] * 1000;
      chk((est - v <= 500 && v - est <= 500) || (meta != 0 && est - v <= 1000 && v - est <= 1000),
          $sformatf("decoded %0d vs input %0d", est, v));
      chk(ctrl_p == '1 && ctrl_n == '1, "DAC reset after EoC");
      chk(equ && !equ_n, "equalization on after EoC");
      chk(rst_cmp, "comparator held in reset after EoC");
      n_complete++; n_equ += equ;
      if (bwc[1] != bwc[N]) n_noise++;
      tap_seen[tap]++;
      if (tap * 18 + 13 < 60) begin
        chk(ana.settle_viol > sv0, "short tap flagged by the DAC model");
        n_short_tap++;
      end else chk(ana.settle_viol == sv0, "DAC settling respected");
      if (period > 8000) n_slow++;
    end else begin
      chk(!seen_eoc && !eoc, "no end of conversion");
      chk(dout == last_dout, "previous result kept");
      if (mode == 1) n_pd++;
      else if (mode == 2) n_abort++;
      else begin chk(ana.n_dec < N, "fast clock: conversion unfinished"); n_fast++; end
    end
  endtask

  initial begin
    #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (tap_seen[i]) tap_seen[i] = 0;
    // enter sampling (Start falls: sets and clears all state), then a first
    // conversion to load the output register
    // power-up: the DAC-control latches clear on a falling edge of RST_DAC,
    // which an arbitrary initial End-of-Conversion state may hide, so run
    // one throw-away sampling/conversion cycle before the first real one
    #1; clk = 1; #500; clk = 0; #2500; clk = 1; #2000;
    convert(1000, 2667, 0);
    for (int i = 0; i < 60; i++) begin
      noise_sel = N'(1) << ($urandom % N);
      bw_ini = 4'($urandom); bw_fin = 4'($urandom);
      convert(int'($urandom % 2046001) - 1023000, 2667, 0);
    end
    noise_sel = 13'h0100; bw_ini = 4'b0000; bw_fin = 4'b1111;
    // metastable residues: at step 1, 2 and 3
    convert(0, 2667, 0);
    convert(512000, 2667, 0);
    convert(232000, 2667, 0);
    convert(-512000 - 10, 2667, 0);
    // temporizer trims
    for (int t = 1; t <= 4; t++) begin
      delay_sel = 5'(1 << (t - 1));
      repeat (3) convert(int'($urandom % 2046001) - 1023000, 2667, 0);
    end
    delay_sel = 5'b00100;
    // power down and external reset during a conversion
    convert(300000, 2667, 1);
    convert(300000, 2667, 0);
    convert(-77000, 2667, 2);
    convert(-77000, 2667, 0);
    // too fast, then slow
    convert(123456, 1500, 0);
    convert(123456, 2667, 0);
    convert(-654321, 10000, 0);
    chk(ana.equ_viol == 0, "never equalizing while sampling");
    chk(ana.rst_order_viol == 0, "reset outputs complementary");
    chk(n_complete > 60, "complete conversions");
    chk(n_noise > 0, "noise-code switch");
    chk(n_met_pulse >= 3, "metastability detector fired");
    for (int t = 1; t <= 4; t++) chk(tap_seen[t] > 0, $sformatf("tap %0d used", t));
    chk(n_short_tap > 0, "taps below DAC settling flagged");
    chk(n_pd > 0, "power down");
    chk(n_abort > 0, "external reset");
    chk(n_fast > 0, "too-fast clock");
    chk(n_slow > 0, "slow clock");
    chk(n_equ > 0, "equalization");
    $display("INFO complete=%0d noise=%0d meta=%0d pd=%0d abort=%0d fast=%0d slow=%0d short_tap=%0d",
             n_complete, n_noise, n_met_pulse, n_pd, n_abort, n_fast, n_slow, n_short_tap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
