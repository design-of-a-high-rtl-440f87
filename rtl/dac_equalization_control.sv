// DAC equalization control.
// After the last comparison EoC rises and endbar falls; once the DAC has been
// reset endbar rises again and the AND of EoC and endbar goes high. While the
// converter is still outside the sampling phase (CLKbar high) the NAND drives
// equbar low and equ high, closing the switch that shorts the two DAC halves
// to the common mode. Sampling (CLKbar low) opens it at once. Gates as in the
// document, combinational.
`timescale 1ps/1ps
module dac_equalization_control (
  input  logic eoc,    // end of conversion
  input  logic end_n,  // endbar from the end-of-conversion generator
  input  logic clk_b,  // CLKbar
  output logic equ,    // equalization switch on
  output logic equ_n
);
  always_comb begin
    equ_n = ~((eoc & end_n) & clk_b);
    equ   = ~equ_n;
  end
endmodule
