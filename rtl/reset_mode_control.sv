// Reset mode control of the SAR logic.
// Start is high only in the conversion phase (CLKbar high) with the external
// reset released; it sets the shift register and, through Startbar, holds the
// comparator in reset. The active-low DAC reset is asserted whenever Start is
// low and also once the conversion has ended (EoC high), which returns every
// DAC control signal to 1. Two AND gates and an inverter, as in the document;
// purely combinational, no clock.
`timescale 1ps/1ps
module reset_mode_control (
  input  logic clk_b,     // CLKbar: low during sampling
  input  logic reset_n,   // external reset, active low
  input  logic eoc,       // end of conversion
  output logic start,     // Start
  output logic start_n,   // Startbar
  output logic rst_dac_n  // DAC reset, active low
);
  always_comb begin
    start     = clk_b & reset_n;
    start_n   = ~start;
    rst_dac_n = start & ~eoc;
  end
endmodule
