// Programmable-timing-window metastability detector.
// When the comparator is released (RST_CMPbar rises) a delay inverter starts;
// its output falls one window later (about 100 ps at tap 3) and clocks a
// low-edge flip-flop that samples XNOR(CMP_P, CMP_N). If the comparator has
// decided by then, one output is low and the flip-flop stores 0; if not, it
// stores 1 and MET rises. RST_CMPbar low (comparator reset) clears MET.
// The clear is level-sensitive as in the circuit: the flip-flop is cleared
// on the falling edge of RST_CMPbar and its output is also gated by
// RST_CMPbar, so a 1 left over from power-up cannot hold the comparator in
// reset (MET pulls the reset node low, which would otherwise never give the
// falling edge that clears it).
// Structure as in the document; the delay inverter is the behavioural model
// of the temporizer with its own buffer delay and its power down tied low.
`timescale 1ps/1ps
module metastability_detector #(
  parameter int N_DELAY    = sar_pkg::N_DELAY,
  parameter int TAU_BUF_PS = 29,
  parameter int TAU_TG_PS  = 8,
  parameter int TAU_NOR_PS = 5
) (
  input  logic               rst_cmp_n,  // comparator preamplifier reset
  input  logic               cmp_p,
  input  logic               cmp_n,
  input  logic [N_DELAY:1]   tcmp_sel,   // one-hot window trim t_CMP<1:5>
  output logic               met
);
  logic win, met_q, rst_gate_n;

  delay_inverter #(
    .N_TAPS(N_DELAY), .TAU_BUF_PS(TAU_BUF_PS), .TAU_TG_PS(TAU_TG_PS), .TAU_NOR_PS(TAU_NOR_PS)
  ) u_win (
    .a(rst_cmp_n), .sel(tcmp_sel), .pd(1'b0), .b_i(win)
  );

  always_ff @(negedge win or negedge rst_cmp_n) begin
    if (!rst_cmp_n) met_q <= 1'b0;
    else            met_q <= ~(cmp_p ^ cmp_n);
  end
  // The gating copy of RST_CMPbar is delayed by 1 ps so that the power-up
  // case (met_q = 1 pulling node A low) is not a zero-delay loop. In normal
  // operation met_q is already 0 whenever this gate matters, so it adds no
  // delay to MET.
  assign #1 rst_gate_n = rst_cmp_n;
  assign met = met_q & rst_gate_n;
endmodule
