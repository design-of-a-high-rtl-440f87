// Shared constants of the SAR logic.
// N_STEPS comparisons per conversion (13: nine redundant steps for the first
// seven bits plus four binary ones, 11 output bits), N_BW switchable comparator
// capacitors, N_DELAY taps of the temporizers. All three are the document's.
`timescale 1ps/1ps
package sar_pkg;
  localparam int N_STEPS = 13;
  localparam int N_BW    = 4;
  localparam int N_DELAY = 5;
endpackage
