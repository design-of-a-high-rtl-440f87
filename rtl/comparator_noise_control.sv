// Comparator noise control.
// Chooses how many of the comparator's inter-stage capacitors are connected:
// BW_ini until the selected step has been evaluated, BW_fin afterwards.
// A one-hot sel<1:N> picks one input of an N-to-1 MUX whose inputs are
// {1, step<1>, ..., step<N-2>, 0}; the picked value is sampled by a flip-flop
// on every rising edge of comparison done, and the flip-flop output switches
// four 2-to-1 MUXes from the initial to the final code. With sel<k> the code
// changes as soon as comparison k is done, i.e. at the start of the comparator
// reset, so the capacitors settle before comparison k+1. sel<N> never changes
// the code (its input is 0). Start low clears the flip-flop, so each conversion
// begins with BW_ini. Structure as in the document; the input tied to 0 is the
// option the document allows for the last step.
`timescale 1ps/1ps
module comparator_noise_control #(
  parameter int N_STEPS = sar_pkg::N_STEPS,
  parameter int N_BW    = sar_pkg::N_BW
) (
  input  logic               cmp_done,  // valid: samples on rising edge
  input  logic               start,     // Start, clears the flip-flop when low
  input  logic [N_STEPS:1]   step,      // step<1:N> from the DAC control loop
  input  logic [N_STEPS:1]   sel,       // one-hot step selection
  input  logic [N_BW:1]      bw_ini,    // initial capacitor code
  input  logic [N_BW:1]      bw_fin,    // final capacitor code
  output logic [N_BW:1]      bw         // code to the comparator switches
);
  logic [N_STEPS:1] mux_in;
  logic             d, q;

  always_comb begin
    mux_in[1]       = 1'b1;
    for (int i = 2; i < N_STEPS; i++) mux_in[i] = step[i-1];
    mux_in[N_STEPS] = 1'b0;
    d = |(mux_in & sel);
  end

  always_ff @(posedge cmp_done or negedge start) begin
    if (!start) q <= 1'b0;
    else        q <= d;
  end

  assign bw = q ? bw_fin : bw_ini;
endmodule
