`timescale 1ps/1fs
// idac: behavioural model of the current DAC of the pulse-width detector.
//
// This is a behavioural model of an analog block. The real IDAC is a cascode
// current mirror: an offset current always flows, and each of 32 thermometer
// bits adds one unit branch; a wide-swing mirror delivers the sum to the
// capacitors, and enb gates the mirror bias. The model gives
//
//   i_ua = I_OFF_UA + (thermometer bits set) * I_UNIT_UA   (0 when en is low)
//
// The structure and the 32-bit thermometer control are the design's. The
// currents are this design's choice: they put the design's ideal 84.48 uA
// (24 fF capacitors at 1.6 GHz) near code 21 and cover the 1.0-2.0 GHz range
// (52.8 uA to 105.6 uA for a 0.55 V threshold) inside codes 0 to 31.
// The reference current ibias is folded into I_UNIT_UA and I_OFF_UA.
//
// Interface: therm[31:0], en; i_ua (real, microamperes), valid immediately.
module idac
  import qec_pkg::*;
#(
  parameter real I_OFF_UA  = 36.0,
  parameter real I_UNIT_UA = 2.2
) (
  input  logic [DAC_UNITS-1:0] therm,
  input  logic                 en,
  output real                  i_ua
);
  always_comb
    i_ua = en ? I_OFF_UA + real'($countones(therm)) * I_UNIT_UA : 0.0;
endmodule
