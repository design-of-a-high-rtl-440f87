// Dynamic latch with enable, one per comparison step (StrongArm-like, no clock).
// Inputs are the inverted comparator outputs; both are low while the comparator
// is reset. While the active-low enable is on, the first input that rises
// discharges the opposite output: in_n (CMP_N fell, positive decision) pulls
// CTRL_P low, in_p (CMP_P fell, negative decision) pulls CTRL_N low. Once one
// output is low the decision cannot change until the active-low DAC reset
// returns both outputs to 1. If both inputs are high at once (a metastable
// comparator whose outputs both sagged) the positive decision is taken; the
// document only says the stored value may then be wrong.
// Modelled as a flip-flop clocked by (enable AND input) with an asynchronous
// reset, which is how the circuit behaves: the comparator edge is the trigger.
// The trigger is a derived clock (a gated comparator output); this is the
// asynchronous nature of the logic and is intended.
`timescale 1ps/1ps
module dynamic_latch_en (
  input  logic en_n,       // enable E<i>, active low
  input  logic in_p,       // inverted CMP_P
  input  logic in_n,       // inverted CMP_N
  input  logic rst_dac_n,  // DAC reset, active low
  output logic ctrl_p,     // CTRL_P<i>
  output logic ctrl_n      // CTRL_N<i>
);
  logic fire;
  assign fire = ~en_n & (in_p | in_n);

  always_ff @(posedge fire or negedge rst_dac_n) begin
    if (!rst_dac_n)           {ctrl_p, ctrl_n} <= 2'b11;
    else if (ctrl_p & ctrl_n) {ctrl_p, ctrl_n} <= in_n ? 2'b01 : 2'b10;
  end
endmodule
