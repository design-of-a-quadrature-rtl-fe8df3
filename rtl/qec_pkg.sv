`timescale 1ps/1fs
// qec_pkg: widths, reset values and the calibration-stage encoding shared by
// the quadrature error corrector (QEC) modules.
//
// The 8-bit DCDL code and the 5-bit IDAC code follow the design (8-bit DCDLs,
// dac_ctrl[4:0]). The mid-scale DCDL reset code 128 is the starting value seen
// in the design's code-tracking plot; the stage encoding is this design's own.
package qec_pkg;

  localparam int unsigned DCDL_W    = 8;    // DCDL control code width
  localparam int unsigned DAC_W     = 5;    // IDAC control code width
  localparam int unsigned CNT_W     = 3;    // width of dout from the 3-bit counter
  localparam int unsigned DAC_UNITS = 32;   // IDAC thermometer units
  localparam int unsigned CRS_TAPS  = 16;   // coarse delay line taps (MUX16)
  localparam int unsigned FINE_CAPS = 15;   // fine delay line MOSCAP switches

  localparam logic [DCDL_W-1:0] DCDL_MID = 8'd128;

  typedef logic [DCDL_W-1:0] dcdl_code_t;
  typedef logic [DAC_W-1:0]  dac_code_t;

  // Which neighbouring pair the DQS pulse generator compares.
  typedef enum logic [1:0] {
    PAIR_I_Q   = 2'd0,   // adjust Q
    PAIR_Q_IB  = 2'd1,   // adjust IB
    PAIR_IB_QB = 2'd2    // adjust QB
  } pair_sel_e;

  // Stages of the loop-filter flow.
  typedef enum logic [2:0] {
    ST_SAR    = 3'd0,    // 5-bit SAR search of the IDAC code (CLK mode)
    ST_DAC_MV = 3'd1,    // majority-vote tracking of the IDAC code (CLK mode)
    ST_Q_MV   = 3'd2,    // majority-vote update of the Q DCDL   (DQS mode)
    ST_IB_MV  = 3'd3,    // majority-vote update of the IB DCDL  (DQS mode)
    ST_QB_MV  = 3'd4     // majority-vote update of the QB DCDL  (DQS mode)
  } stage_e;

endpackage
