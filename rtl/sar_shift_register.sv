// Shift register of the DAC control loop: N_STEPS low-edge-triggered flip-flops.
// All flip-flops share the comparison-done clock and are set to 1 while Start
// is low (sampling or external reset). DFF1 has its input tied to 0, so after
// comparison i, when the comparator has been reset and valid falls, P<i> falls
// and stays low for the rest of the conversion (thermometer code). step<i> is
// the complement of P<i> and tells that comparison i is complete.
// Triggering on the falling edge of valid follows the document: it keeps a
// latch from being enabled before the previous comparison has been reset.
// The set acts asynchronously and dominates the clock.
`timescale 1ps/1ps
module sar_shift_register #(
  parameter int N_STEPS = sar_pkg::N_STEPS
) (
  input  logic               valid,  // comparison done; shifts on its falling edge
  input  logic               start,  // active-low set
  output logic [N_STEPS:1]   p,      // propagate P<1:N>
  output logic [N_STEPS:1]   step    // step<1:N> = not P
);
  always_ff @(negedge valid or negedge start) begin
    if (!start) p <= '1;
    else        p <= {p[N_STEPS-1:1], 1'b0};
  end
  assign step = ~p;
endmodule
