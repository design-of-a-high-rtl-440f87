// DAC control loop of the proposed logic.
// A shift register of N_STEPS low-edge flip-flops produces the thermometer
// code P<1:N>. Each latch i gets the active-low enable E<i> = XNOR(P<i-1>, P<i>),
// with Startbar in place of P<0>: E<1> is on from the start of the conversion
// phase until the comparator is reset after comparison 1, and E<i> is on from
// the reset after comparison i-1 until the reset after comparison i. So exactly
// one latch is enabled, and it is enabled while the comparator is still reset;
// the comparator decision then triggers it directly, without waiting for a
// flip-flop. The latch inputs are the inverted comparator outputs.
// met (metastability flag) forces a negative decision through NAND(METbar,
// CMP_P) and is ORed into the shift-register clock by the caller; tie it low
// for the default logic.
`timescale 1ps/1ps
module dac_control_loop #(
  parameter int N_STEPS = sar_pkg::N_STEPS
) (
  input  logic               cmp_p,      // comparator outputs, high in reset
  input  logic               cmp_n,
  input  logic               cmp_done,   // valid (OR MET): shift on falling edge
  input  logic               met,
  input  logic               start,      // Start, active-low set
  input  logic               start_n,    // Startbar
  input  logic               rst_dac_n,  // DAC reset, active low
  output logic [N_STEPS:1]   ctrl_p,
  output logic [N_STEPS:1]   ctrl_n,
  output logic [N_STEPS:1]   p,
  output logic [N_STEPS:1]   step,
  output logic [N_STEPS:1]   en_n
);
  logic lat_in_p, lat_in_n;
  assign lat_in_p = ~(~met & cmp_p);
  assign lat_in_n = ~cmp_n;

  sar_shift_register #(.N_STEPS(N_STEPS)) u_sr (
    .valid(cmp_done), .start(start), .p(p), .step(step)
  );

  // Enable generators: XNOR of the previous and the current propagate signal.
  always_comb begin
    en_n[1] = ~(start_n ^ p[1]);
    for (int i = 2; i <= N_STEPS; i++) en_n[i] = ~(p[i-1] ^ p[i]);
  end

  for (genvar i = 1; i <= N_STEPS; i++) begin : g_dl
    dynamic_latch_en u_dl (
      .en_n(en_n[i]), .in_p(lat_in_p), .in_n(lat_in_n), .rst_dac_n(rst_dac_n),
      .ctrl_p(ctrl_p[i]), .ctrl_n(ctrl_n[i])
    );
  end
endmodule
