// Set-reset latch built from two cross-coupled NOR gates.
// S=1 sets Q, R=1 clears it, S=R=0 holds. The forbidden S=R=1 gives
// Q = Qbar = 0, as the two NOR gates would. The stored bit is a level-sensitive
// latch (reset wins), and Qbar is the NOR of S and Q so that it matches the
// gate-level circuit in every case. Used by the end-of-conversion generator.
// A latch is inferred on purpose: this block is a storage element.
`timescale 1ps/1ps
module sr_latch (
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);
  always_latch begin
    if (r)      q = 1'b0;
    else if (s) q = 1'b1;
  end
  assign q_n = ~(s | q);
endmodule
