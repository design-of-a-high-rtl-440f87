// Process-corner operating points of the SAR logic. Four copies of the logic
// run side by side on the same sampling clock and input, each with the
// temporizer tap used for its corner (FF: tap 4, SS: tap 2, FS and SF: tap 3)
// and with temporizer stage delays and a lumped logic delay scaled to that
// corner's reported loop delays (comparator reset about 62.6 / 70.9 / 67.9 /
// 66.2 ps, reset-loop logic delay about 33 / 38 / 33 / 34 ps). The corner
// delays themselves are the original circuit's figures; turning them into
// per-stage delays (FF 13+6+4, SS 26+12+7, FS 18+9+5, SF 18+7+5 ps for buffer,
// transmission gate and NOR) is this testbench's own scaling.
// For 40 random inputs at 375 MS/s every corner must finish in time with the
// reference code and the exact conversion time (12 resets of
// max(temporizer delay, 40 ps comparator reset) plus 13 decisions), and the
// DAC must always get at least the 60 ps minimum settling time. Then the
// period is shortened in 50 ps steps to report the fastest rate of each
// corner with these model delays.
`timescale 1ps/1ps
module tb_sar_corners;
  localparam int N = 13, NC = 4;
  localparam int W [1:12] = '{512, 280, 152, 84, 46, 25, 14, 8, 4, 2, 1, 1};
  localparam int T_DEC = 40, T_RST = 40, META = 20;
  // per corner: FF, SS, FS, SF
  localparam int TAP    [NC] = '{4, 2, 3, 3};
  localparam int TBUF   [NC] = '{13, 26, 18, 18};
  localparam int TTG    [NC] = '{6, 12, 9, 7};
  localparam int TNOR   [NC] = '{4, 7, 5, 5};
  localparam int TLOGIC [NC] = '{33, 38, 33, 34};

  logic clk = 0, reset_n = 1, pd = 0;
  logic [N:1] noise_sel = 13'h1000;           // never switch the noise code
  logic [4:1] bw_ini = 4'b0000, bw_fin = 4'b0000;
  logic [5:1] tcmp_sel = 5'b00100;
  int vin = 0, checks = 0, failures = 0;
  logic [N:1] ref_bits;

  logic [N:1] dout [NC];
  logic       eoc  [NC];
  time        t_eoc [NC];
  int         settle [NC];
  int         best [NC];

  for (genvar c = 0; c < NC; c++) begin : g_corner
    logic cmp_p, cmp_n, rst_cmp, rst_cmp_n, equ, equ_n, met;
    logic [N:1] ctrl_p, ctrl_n, step;
    logic [4:1] bw;
    sar_logic #(
      .TMR_TAU_BUF_PS(TBUF[c]), .TMR_TAU_TG_PS(TTG[c]), .TMR_TAU_NOR_PS(TNOR[c])
    ) dut (
      .clk(clk), .reset_n(reset_n), .cmp_p(cmp_p), .cmp_n(cmp_n), .pd(pd),
      .delay_sel(5'(1) << (TAP[c] - 1)), .tcmp_sel(tcmp_sel), .noise_sel(noise_sel),
      .bw_ini(bw_ini), .bw_fin(bw_fin), .rst_cmp(rst_cmp), .rst_cmp_n(rst_cmp_n),
      .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .bw(bw), .step(step), .dout(dout[c]),
      .eoc(eoc[c]), .equ(equ), .equ_n(equ_n), .met(met)
    );
    sar_adc_model #(.T_DEC_PS(T_DEC), .T_LOGIC_PS(TLOGIC[c]), .T_RST_PS(T_RST),
                    .META_MLSB(META)) ana (
      .clk(clk), .vin_mlsb(vin), .rst_cmp(rst_cmp), .rst_cmp_n(rst_cmp_n),
      .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .equ(equ), .bw(bw), .cmp_p(cmp_p), .cmp_n(cmp_n)
    );
    always begin
      @(posedge eoc[c]);
      t_eoc[c] = $time;
    end
    assign settle[c] = ana.settle_viol;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference bits for vin; returns 0 if some step would be metastable
  function automatic bit reference(input int v, output logic [N:1] bits);
    int r = v;
    for (int k = 1; k <= N; k++) begin
      if (r < META && r > -META) return 0;
      bits[k] = r > 0;
      if (k <= 12) r += bits[k] ? -W[k] * 1000 : W[k] * 1000;
    end
    return 1;
  endfunction

  function automatic int t_reset(input int c);
    int d = TAP[c] * TBUF[c] + TTG[c] + TNOR[c];
    return d > T_RST ? d : T_RST;
  endfunction

  // one sampling + conversion period; returns per-corner pass flags
  task automatic period_run(input int period, output bit ok [NC]);
    time t0;
    clk = 1; #(period / 8);
    clk = 0; t0 = $time; #(period - period / 8 - 1);
    for (int c = 0; c < NC; c++) begin
      ok[c] = eoc[c] && dout[c] == ref_bits && t_eoc[c] > t0;
    end
  endtask

  initial begin
    #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ok [NC];
    time t0;
    // power-up: one throw-away cycle so that the DAC-control latches see a
    // falling edge of their reset
    #1; clk = 1; #500; clk = 0; #2500; clk = 1; #2000;
    // 40 conversions at 375 MS/s with exact timing
    for (int i = 0; i < 40; i++) begin
      do vin = int'($urandom % 2046001) - 1023000; while (!reference(vin, ref_bits));
      clk = 1; #333;
      clk = 0; t0 = $time; #2333;
      for (int c = 0; c < NC; c++) begin
        automatic int tconv = 12 * t_reset(c) + 13 * (T_DEC + TLOGIC[c]);
        chk(eoc[c] && dout[c] == ref_bits, $sformatf("corner %0d code %b vs %b", c, dout[c], ref_bits));
        chk(t_eoc[c] - t0 == tconv, $sformatf("corner %0d conversion time %0t vs %0d", c, t_eoc[c] - t0, tconv));
      end
    end
    for (int c = 0; c < NC; c++) chk(settle[c] == 0, $sformatf("corner %0d DAC settling below 60 ps", c));
    // fastest period per corner with a 50 mV input
    vin = 56_883;
    void'(reference(vin, ref_bits));
    foreach (best[c]) best[c] = 0;
    for (int period = 2667; period > 1000; period -= 50) begin
      bit all_fail = 1;
      period_run(period, ok);
      period_run(period, ok);
      for (int c = 0; c < NC; c++) begin
        if (ok[c] && (best[c] == 0 || best[c] == period + 50)) best[c] = period;
        if (ok[c]) all_fail = 0;
      end
      if (all_fail) break;
    end
    for (int c = 0; c < NC; c++) begin
      chk(best[c] > 0 && best[c] <= 2667, $sformatf("corner %0d reaches 375 MS/s", c));
      $display("INFO corner %s tap %0d: step reset %0d ps, fastest period %0d ps (%0d MS/s)",
               c == 0 ? "FF" : c == 1 ? "SS" : c == 2 ? "FS" : "SF", TAP[c], t_reset(c),
               best[c], best[c] > 0 ? 1000000 / best[c] : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
