// Behavioural model of the analog part of one SAR core, for testbenches only:
// sampler, differential capacitive DAC and two-stage dynamic comparator.
// The DAC is tracked as a residue in milli-LSB: the input is tracked while
// CLK is high and held when it falls; each DAC control that goes low removes
// its weight from the higher side (CTRL_P low: residue - W, CTRL_N low:
// residue + W). Weights are redundant (average ratio about 1.85, last ones
// binary) and are this model's own numbers: 512 280 152 84 46 25 14 8 4 2 1 1.
// The comparator decides T_DEC_PS + T_LOGIC_PS + T_BW_PS per connected noise
// capacitor after RST_CMP falls (T_LOGIC_PS lumps in the gate delays the
// zero-delay logic does not have); it pulls CMP_N low for a positive residue
// and CMP_P low otherwise. A residue smaller than META_MLSB is metastable:
// after T_META_PS both outputs sag low together. T_RST_PS after RST_CMP rises
// both outputs are high again. The model logs every decision and counts DAC
// settling violations (comparator released less than T_SETTLE_PS after a DAC
// control changed) and equalization during sampling.
`timescale 1ps/1ps
module sar_adc_model #(
  parameter int T_DEC_PS    = 40,
  parameter int T_LOGIC_PS  = 35,
  parameter int T_BW_PS     = 4,
  parameter int T_RST_PS    = 40,
  parameter int T_META_PS   = 250,
  parameter int META_MLSB   = 20,
  parameter int T_SETTLE_PS = 60
) (
  input  logic        clk,
  input  int          vin_mlsb,   // differential input, milli-LSB
  input  logic        rst_cmp,
  input  logic        rst_cmp_n,
  input  logic [13:1] ctrl_p,
  input  logic [13:1] ctrl_n,
  input  logic        equ,
  input  logic [4:1]  bw,
  output logic        cmp_p,
  output logic        cmp_n
);
  localparam int W [1:12] = '{512, 280, 152, 84, 46, 25, 14, 8, 4, 2, 1, 1};

  int  sampled;
  int  n_dec;                 // decisions in this conversion
  int  dec_bw   [1:16];       // capacitor count used by each decision
  bit  dec_meta [1:16];
  int  settle_viol = 0, equ_viol = 0, rst_order_viol = 0;
  time t_ctrl = 0, t_release = 0;
  int  tok = 0;

  function automatic int residue();
    int r = sampled;
    for (int k = 1; k <= 12; k++) begin
      if (!ctrl_p[k]) r -= W[k] * 1000;
      else if (!ctrl_n[k]) r += W[k] * 1000;
    end
    return r;
  endfunction

  always @(clk or vin_mlsb) if (clk) sampled = vin_mlsb;
  always @(posedge clk) n_dec = 0;
  always begin
    @(ctrl_p, ctrl_n);
    t_ctrl = $time;
  end
  always @(posedge equ or posedge clk) if (equ && clk) equ_viol++;
  always @(rst_cmp or rst_cmp_n) if (rst_cmp == rst_cmp_n) rst_order_viol++;

  initial begin cmp_p = 1; cmp_n = 1; end

  always @(negedge rst_cmp) fork
    begin
      automatic int my = ++tok;
      automatic int r, t;
      automatic bit m;
      t_release = $time;
      if (!clk && $time - t_ctrl < T_SETTLE_PS && n_dec > 0) settle_viol++;
      r = residue();
      m = (r < META_MLSB) && (r > -META_MLSB);
      t = m ? T_META_PS : T_DEC_PS + T_LOGIC_PS + T_BW_PS * $countones(bw);
      #(t);
      if (my == tok && !rst_cmp) begin
        n_dec++;
        if (n_dec <= 16) begin dec_bw[n_dec] = $countones(bw); dec_meta[n_dec] = m; end
        if (m)          begin cmp_p = 0; cmp_n = 0; end
        else if (r > 0) cmp_n = 0;
        else            cmp_p = 0;
      end
    end
  join_none

  always @(posedge rst_cmp) fork
    begin
      automatic int my = ++tok;
      #(T_RST_PS);
      if (my == tok) begin cmp_p = 1; cmp_n = 1; end
    end
  join_none
endmodule
