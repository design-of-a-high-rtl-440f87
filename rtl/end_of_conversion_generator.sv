// End-of-conversion generator with the output register.
// The XOR of the last latch outputs CTRL_P<N>, CTRL_N<N> goes high when the
// last decision is stored: this is the end pulse (end high, endbar low). It
// sets an SR latch whose output is EoC and clocks N output flip-flops that
// store the result. EoC resets the DAC, which returns both last-latch outputs
// to 1 and ends the pulse; EoC itself stays high until the next sampling phase
// (CLKbar low) resets the SR latch. The output bits store NOT CTRL_P<i>, so a
// 1 is a positive decision; the polarity and the lack of reset on the output
// flip-flops are this design's choices.
// The path latch N -> end -> EoC -> DAC reset -> latch N is a loop by design:
// it turns the end signal into a pulse whose width is the loop delay. The
// output flip-flops are clocked by that derived end pulse. The SR latch's
// second output is left unused.
`timescale 1ps/1ps
module end_of_conversion_generator #(
  parameter int N_STEPS = sar_pkg::N_STEPS
) (
  input  logic [N_STEPS:1]   ctrl_p,  // DAC control signals
  input  logic [N_STEPS:1]   ctrl_n,
  input  logic               clk_b,   // CLKbar, low during sampling
  output logic               end_p,   // end pulse
  output logic               end_n,   // endbar
  output logic               eoc,     // end of conversion
  output logic [N_STEPS:1]   dout     // stored conversion result
);
  logic eoc_n;

  assign end_p = ctrl_p[N_STEPS] ^ ctrl_n[N_STEPS];
  assign end_n = ~end_p;

  sr_latch u_srl (.s(end_p), .r(~clk_b), .q(eoc), .q_n(eoc_n));

  always_ff @(posedge end_p) dout <= ~ctrl_p;
endmodule
