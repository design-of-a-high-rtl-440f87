// Comparator reset loop of the proposed logic.
// Node A drives the comparator resets through buffers: RST_CMPbar = A (the
// preamplifier reset, active low) and RST_CMP = NOT A (the latch reset, active
// high); A = 0 means the comparator is being reset.
// Node A is ratioed: NMOS pull-downs always win over the PMOS pull-up. It is
// pulled down by
//   - NAND(CMP_P, CMP_N): a decision was made (also when both outputs sag in a
//     metastable event),
//   - NOT NOR(Startbar, EoC): sampling, external reset or conversion finished,
//   - the end pulse, which acts before EoC has propagated,
//   - MET, when a metastability detector is fitted (tie low otherwise).
// It is pulled up when NAND(B_i, NOR(Startbar, EoC)) is low, B_i being the
// temporizer (delay inverter) output fed from node A. So a comparison starts
// one temporizer delay after the reset began, provided the comparator outputs
// have returned high; the reset time, which is also the DAC settling time, is
// set by the delay select. With neither network on, node A keeps its charge:
// this is modelled as a latch, which is the intended storage of the circuit.
// The removed external comparator reset is not present: P.D. alone keeps the
// comparator reset, through the temporizer.
// Timing: node A falls on the decision (NAND of the outputs), and the
// temporizer output B_i rises one delay after that fall (tap i: i buffer
// delays plus the transmission gate plus the NOR). The pull-up needs B_i high
// AND the pull-down released, i.e. the comparator outputs both back high.
// Therefore the reset time equals the temporizer delay only if the
// comparator returns high before B_i rises, or, counting from the start of
// a comparison, if decision time (with logic) + comparator reset time is
// larger than the temporizer delay; otherwise B_i already sits high and
// node A rises as soon as the comparator has reset.
// node A (always_latch) and the ring A -> temporizer -> B_i -> A are the
// intended self-timed oscillator; it runs only inside a conversion.
`timescale 1ps/1ps
module comparator_reset_loop #(
  parameter int N_DELAY    = sar_pkg::N_DELAY,
  parameter int TAU_BUF_PS = 18,
  parameter int TAU_TG_PS  = 8,
  parameter int TAU_NOR_PS = 5
) (
  input  logic               cmp_p,      // comparator outputs, high in reset
  input  logic               cmp_n,
  input  logic               start_n,    // Startbar
  input  logic               eoc,        // end of conversion
  input  logic               end_p,      // end pulse
  input  logic               met,        // metastability flag
  input  logic               pd,         // temporal power down
  input  logic [N_DELAY:1]   delay_sel,  // one-hot temporizer trim
  output logic               rst_cmp,    // latch reset, active high
  output logic               rst_cmp_n,  // preamplifier reset, active low
  output logic               node_a
);
  logic run, b_i, pull_dn, pull_up;

  assign run     = ~(start_n | eoc);
  assign pull_dn = ~(cmp_p & cmp_n) | ~run | end_p | met;
  assign pull_up = b_i & run;

  always_latch begin
    if (pull_dn)      node_a = 1'b0;
    else if (pull_up) node_a = 1'b1;
  end

  delay_inverter #(
    .N_TAPS(N_DELAY), .TAU_BUF_PS(TAU_BUF_PS), .TAU_TG_PS(TAU_TG_PS), .TAU_NOR_PS(TAU_NOR_PS)
  ) u_tmr (
    .a(node_a), .sel(delay_sel), .pd(pd), .b_i(b_i)
  );

  assign rst_cmp_n = node_a;
  assign rst_cmp   = ~node_a;
endmodule
