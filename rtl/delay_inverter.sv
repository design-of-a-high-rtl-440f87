// Behavioural model (not synthesizable): delay inverter used as the temporizer.
// A chain of N_TAPS buffers delays the input; the one-hot select closes one
// transmission gate, which passes that tap to node S; a NOR of S and the
// temporal power down gives the output, B_i = NOT(S OR P.D.). The delay from
// the input to the output is sel_index * TAU_BUF_PS + TAU_TG_PS + TAU_NOR_PS,
// and P.D. = 1 forces the output low. The structure and the delay formula are
// the document's; the per-stage delays are this model's own numbers, chosen so
// that tap 3 gives 67 ps, the comparator reset time the document reports.
// Each stage has its own (inertial) delay, so a pulse longer than one stage
// delay passes the whole chain, as in a real buffer chain.
// With no tap selected, S is taken as 0.
`timescale 1ps/1ps
module delay_inverter #(
  parameter int N_TAPS     = sar_pkg::N_DELAY,
  parameter int TAU_BUF_PS = 18,
  parameter int TAU_TG_PS  = 8,
  parameter int TAU_NOR_PS = 5
) (
  input  logic              a,    // input
  input  logic [N_TAPS:1]   sel,  // one-hot delay select
  input  logic              pd,   // temporal power down
  output logic              b_i   // NOT(delayed a OR pd)
);
  logic [N_TAPS:1] tap;
  logic            s_mux, s;

  assign #(TAU_BUF_PS) tap[1] = a;
  for (genvar k = 2; k <= N_TAPS; k++) begin : g_buf
    assign #(TAU_BUF_PS) tap[k] = tap[k-1];
  end

  assign s_mux = |(tap & sel);
  assign #(TAU_TG_PS)  s   = s_mux;
  assign #(TAU_NOR_PS) b_i = ~(s | pd);
endmodule
