`timescale 1ps/1fs
// idac_decoder: binary-to-thermometer decoder of the IDAC control code.
//
// The loop filter holds the IDAC code as the 5-bit dac_ctrl; the current DAC
// switches 32 unit current branches with a 32-bit thermometer code. Code n
// turns on units 0..n, so the current rises by one unit per code step and is
// monotonic by construction. The 5-bit code and 32-bit thermometer width are
// the design's; the mapping (n+1 units on for code n, so that every unit is
// used) is this design's choice. Combinational.
module idac_decoder
  import qec_pkg::*;
(
  input  logic [DAC_W-1:0]     dac_ctrl,
  output logic [DAC_UNITS-1:0] therm
);
  always_comb begin
    for (int k = 0; k < DAC_UNITS; k++)
      therm[k] = (k <= int'(dac_ctrl));
  end
endmodule
