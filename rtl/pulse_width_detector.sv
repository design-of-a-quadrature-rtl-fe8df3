`timescale 1ps/1fs
// pulse_width_detector: behavioural model of the pulse-width detector, the
// analog core of the quadrature error corrector.
//
// This is a behavioural model of a mixed-signal block. An IDAC current charges
// capacitors while the pulse is high, and a comparator checks the final
// voltage against its threshold; a flip-flop clocked by dclk stores the
// answer d. In CLK mode all four equal capacitors (4C) are charged for one
// clock period T; in DQS mode only one (C) is charged for the DQS phase gap
// t. With the same current the two voltages are equal exactly when t = T/4,
// so an IDAC code that puts the CLK-mode voltage on the threshold makes d
// tell, in DQS mode, whether a phase gap is longer (d = 1) or shorter than a
// quarter period. The model computes
//
//   V = i_ua * t_charge_ps / C_total_fF * 1e-3   [V]
//
// from the time sw was low, with C_total = 4 * C_FF in CLK mode (sel_sync
// low, sw_clk switches on) and C_FF in DQS mode (sw_dqs only), and sets d = (V > VTH_V + VOS_V)
// at the rising dclk edge. rst clears V. The four 24 fF capacitors, the
// capacitor ratio, the IDAC, the comparator with its dclk flip-flop and the
// switch logic are the design's. The analog effects the design sizes its
// circuit against (charge sharing with node A, channel-length modulation,
// capacitor mismatch) are not modelled; VOS_V stands in for a residual
// offset. The 0.55 V threshold (half of the 1.1 V supply) is this design's
// choice; it is the voltage the design's 84.48 uA ideal current gives on 96 fF
// in 625 ps.
//
// Interface: rst_n, pulse, sel_sync (mode of this pulse), dac_ctrl[4:0], en
// (IDAC enable); d is valid T_DCLK_PS after the pulse falls and held until
// the next decision.
module pulse_width_detector
  import qec_pkg::*;
#(
  parameter real C_FF  = 24.0,
  parameter real VTH_V = 0.55,
  parameter real VOS_V = 0.0
) (
  input  logic             rst_n,
  input  logic             en,
  input  logic             pulse,
  input  logic             sel_sync,
  input  logic [DAC_W-1:0] dac_ctrl,
  output logic             d
);
  logic [DAC_UNITS-1:0] therm;
  real                  i_ua;
  logic                 sw, sw_dqs, sw_clk, dclk, rst;
  real                  t_start;
  real                  vc;
  real                  c_tot;

  idac_decoder u_dec (.dac_ctrl(dac_ctrl), .therm(therm));
  idac         u_idac (.therm(therm), .en(en), .i_ua(i_ua));
  pwd_switch_logic u_sw (
    .pulse  (pulse),
    .sel    (sel_sync),
    .sw     (sw),
    .sw_dqs (sw_dqs),
    .sw_clk (sw_clk),
    .dclk   (dclk),
    .rst    (rst)
  );

  initial begin
    t_start = 0.0;
    vc      = 0.0;
    c_tot   = 4.0 * C_FF;
  end

  // Charging starts when sw falls; the capacitor set follows the mode switches.
  always @(negedge sw) begin
    t_start = $realtime;
    c_tot   = sel_sync ? C_FF : 4.0 * C_FF;
  end

  // Charging ends when sw rises.
  always @(posedge sw)
    vc = i_ua * ($realtime - t_start) / c_tot * 1.0e-3;

  always @(posedge rst) vc = 0.0;

  // Comparator flip-flop.
  always @(posedge dclk or negedge rst_n) begin
    if (!rst_n) d <= 1'b0;
    else        d <= (vc > VTH_V + VOS_V);
  end

  // sw_clk and sw_dqs only pick the capacitor switches of the real circuit;
  // the model takes the capacitor set from sel_sync directly.
  wire unused_sw = sw_clk ^ sw_dqs;
endmodule
