`timescale 1ps/1fs
// dcdl_decoder: control decoder of the 8-bit digitally controlled delay line.
//
// The DCDL is a coarse NAND-chain delay line (16 taps chosen by a MUX16)
// followed by a fine MOSCAP delay line (15 switched capacitors). The upper
// four code bits choose the coarse tap: sel[15:0] is one-hot, and the chain
// enables ctrlc[14:0] are a thermometer code that keeps the stages up to the
// chosen tap running and turns off the stages behind it, which saves power.
// The lower four bits choose how many of the 15 MOSCAPs are switched in
// (ctrlf[14:0], thermometer). The control signals, their widths and the
// reason for the NAND chain are the design's; the split of the 8-bit code
// into 4 coarse and 4 fine bits is this design's reading of the widths.
// Combinational.
module dcdl_decoder
  import qec_pkg::*;
(
  input  logic [DCDL_W-1:0]    code,
  output logic [CRS_TAPS-2:0]  ctrlc,
  output logic [CRS_TAPS-1:0]  sel,
  output logic [FINE_CAPS-1:0] ctrlf
);
  logic [3:0] crs, fine;
  assign crs  = code[7:4];
  assign fine = code[3:0];

  always_comb begin
    for (int k = 0; k < CRS_TAPS - 1; k++)
      ctrlc[k] = (k < int'(crs));
    for (int k = 0; k < CRS_TAPS; k++)
      sel[k] = (k == int'(crs));
    for (int k = 0; k < FINE_CAPS; k++)
      ctrlf[k] = (k < int'(fine));
  end
endmodule
