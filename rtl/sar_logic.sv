// Asynchronous SAR logic for one core of an 11-bit, 13-comparison SAR ADC.
//
// Conversion cycle. While CLK is high the core samples: Start is low, the
// shift register is set, the DAC controls are reset to 1 and node A holds the
// comparator in reset. When CLK falls, node A rises and the comparator makes
// decision 1. The enabled latch of the DAC control loop stores it straight
// from the comparator outputs and switches the DAC; at the same time the NAND
// of the comparator outputs pulls node A low, resetting the comparator. When
// both comparator outputs are high again, valid falls, the shift register
// moves its 0 one place and enables the next latch, and after one temporizer
// delay (the DAC settling time) node A rises for the next decision. After
// decision 13 the end pulse clocks the output register and sets EoC, which
// resets the DAC and keeps the comparator reset; once the DAC is back at the
// sampled value the two DAC halves are equalized until the next sampling phase.
// The noise control switches the comparator's capacitor code from bw_ini to
// bw_fin after the selected step.
//
// Metastability: because valid is a NAND of the comparator outputs, two
// outputs that both sag during a slow decision still trigger the loops, so a
// conversion always completes (the stored bit may then be wrong). With
// USE_MET_DETECTOR = 1 a timing-window detector is added, which pulls node A
// down, clocks the shift register through an OR gate and forces a negative
// decision; by default it is left out, as in the document's final logic.
//
// The logic is asynchronous: there is no clock other than the sampling clock.
// The gates are zero-delay; all loop timing comes from the temporizer (a
// behavioural delay model) and from the comparator and DAC outside.
// What follows the document: the loop structures, gate functions and sizes.
// This design's own choices: dout polarity (1 = positive decision), the
// temporizer stage delays, and the parameter that fits the detector.
//
// Loops and latches that synthesis reports. They are the circuit, not
// mistakes, and stay:
//   - node A -> temporizer -> B_i -> node A: the self-timed comparator reset
//     oscillation; it runs only while NOR(Startbar, EoC) is high and the
//     comparator has answered, and stops at the end of the conversion;
//   - latch 13 -> XOR (end pulse) -> SR latch (EoC) -> RST_DAC -> latch 13:
//     the end pulse resets itself through the DAC reset, which makes it a
//     pulse as long as the loop delay;
//   - node A and the SR latch are level-sensitive storage (always_latch), and
//     the DAC-control latches and shift register are clocked by derived
//     signals (comparator outputs and valid), as in any asynchronous SAR.
// Timing constraint of the reset loop: the comparator reset lasts exactly
// one temporizer delay only while the decision time (comparator plus logic)
// plus the comparator's own reset time is longer than that delay; with a
// faster comparator or a longer tap, the decision path sets the cycle
// instead. The temporizer defaults give i x 18 ps + 8 ps + 5 ps at tap i,
// 67 ps at tap 3, against a modelled 75 ps decision and 40 ps comparator
// reset.
`timescale 1ps/1ps
module sar_logic #(
  parameter int N_STEPS          = sar_pkg::N_STEPS,
  parameter int N_BW             = sar_pkg::N_BW,
  parameter int N_DELAY          = sar_pkg::N_DELAY,
  parameter bit USE_MET_DETECTOR = 1'b0,
  parameter int TMR_TAU_BUF_PS   = 18,
  parameter int TMR_TAU_TG_PS    = 8,
  parameter int TMR_TAU_NOR_PS   = 5,
  parameter int MET_TAU_BUF_PS   = 29
) (
  input  logic               clk,        // sampling clock CLK, 1 = sampling
  input  logic               reset_n,    // external reset, active low
  input  logic               cmp_p,      // comparator outputs (high in reset)
  input  logic               cmp_n,
  input  logic               pd,         // temporal power down
  input  logic [N_DELAY:1]   delay_sel,  // temporizer trim, one-hot
  input  logic [N_DELAY:1]   tcmp_sel,   // metastability window trim, one-hot
  input  logic [N_STEPS:1]   noise_sel,  // noise control step selection, one-hot
  input  logic [N_BW:1]      bw_ini,
  input  logic [N_BW:1]      bw_fin,
  output logic               rst_cmp,    // comparator latch reset, active high
  output logic               rst_cmp_n,  // comparator preamp reset, active low
  output logic [N_STEPS:1]   ctrl_p,     // DAC controls (CTRL<N> feeds EoC only)
  output logic [N_STEPS:1]   ctrl_n,
  output logic [N_BW:1]      bw,         // comparator capacitor switches
  output logic [N_STEPS:1]   step,       // step<i>: comparison i complete
  output logic [N_STEPS:1]   dout,       // raw result, 1 = positive decision
  output logic               eoc,
  output logic               equ,
  output logic               equ_n,
  output logic               met
);
  logic clk_b, start, start_n, rst_dac_n;
  logic valid, cmp_done, end_p, end_n, node_a;
  logic [N_STEPS:1] p, en_n;

  assign clk_b    = ~clk;
  assign valid    = ~(cmp_p & cmp_n);
  assign cmp_done = valid | met;

  reset_mode_control u_rmc (
    .clk_b(clk_b), .reset_n(reset_n), .eoc(eoc),
    .start(start), .start_n(start_n), .rst_dac_n(rst_dac_n)
  );

  dac_control_loop #(.N_STEPS(N_STEPS)) u_dcl (
    .cmp_p(cmp_p), .cmp_n(cmp_n), .cmp_done(cmp_done), .met(met),
    .start(start), .start_n(start_n), .rst_dac_n(rst_dac_n),
    .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .p(p), .step(step), .en_n(en_n)
  );

  comparator_reset_loop #(
    .N_DELAY(N_DELAY), .TAU_BUF_PS(TMR_TAU_BUF_PS), .TAU_TG_PS(TMR_TAU_TG_PS),
    .TAU_NOR_PS(TMR_TAU_NOR_PS)
  ) u_crl (
    .cmp_p(cmp_p), .cmp_n(cmp_n), .start_n(start_n), .eoc(eoc), .end_p(end_p),
    .met(met), .pd(pd), .delay_sel(delay_sel),
    .rst_cmp(rst_cmp), .rst_cmp_n(rst_cmp_n), .node_a(node_a)
  );

  comparator_noise_control #(.N_STEPS(N_STEPS), .N_BW(N_BW)) u_cnc (
    .cmp_done(cmp_done), .start(start), .step(step), .sel(noise_sel),
    .bw_ini(bw_ini), .bw_fin(bw_fin), .bw(bw)
  );

  end_of_conversion_generator #(.N_STEPS(N_STEPS)) u_eoc (
    .ctrl_p(ctrl_p), .ctrl_n(ctrl_n), .clk_b(clk_b),
    .end_p(end_p), .end_n(end_n), .eoc(eoc), .dout(dout)
  );

  dac_equalization_control u_equ (
    .eoc(eoc), .end_n(end_n), .clk_b(clk_b), .equ(equ), .equ_n(equ_n)
  );

  if (USE_MET_DETECTOR) begin : g_met
    metastability_detector #(
      .N_DELAY(N_DELAY), .TAU_BUF_PS(MET_TAU_BUF_PS), .TAU_TG_PS(TMR_TAU_TG_PS),
      .TAU_NOR_PS(TMR_TAU_NOR_PS)
    ) u_met (
      .rst_cmp_n(rst_cmp_n), .cmp_p(cmp_p), .cmp_n(cmp_n), .tcmp_sel(tcmp_sel), .met(met)
    );
  end else begin : g_no_met
    assign met = 1'b0;
  end
endmodule
