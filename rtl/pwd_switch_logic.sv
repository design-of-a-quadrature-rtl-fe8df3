`timescale 1ps/1fs
// pwd_switch_logic: behavioural model of the switch logic of the pulse-width
// detector.
//
// This is a behavioural model: its outputs drive transistor switches and the
// buffer delays matter. While pulse is high, sw is low and turns on the PMOS
// charging switch; sw_clk (CLK mode, sel low) or sw_dqs (DQS mode, sel high)
// goes low with it to pick the capacitors. When pulse falls, sw rises, ends
// charging, and after one buffer delay (T_DCLK_PS) dclk rises and clocks the
// comparator flip-flop; after a second buffer delay (T_RST_PS) rst0 rises and
// rst (sw and rst0 both high) discharges the capacitors until the next pulse
// pulls sw low again. The signal roles and the two buffers that order
// charge end, sampling and reset are the design's; the delay values are this
// design's choice.
//
// Interface: pulse, sel; sw, sw_dqs, sw_clk (active low), dclk, rst.
module pwd_switch_logic #(
  parameter real T_DCLK_PS = 30.0,
  parameter real T_RST_PS  = 30.0
) (
  input  logic pulse,
  input  logic sel,
  output logic sw,
  output logic sw_dqs,
  output logic sw_clk,
  output logic dclk,
  output logic rst
);
  logic rst0;

  assign sw     = ~pulse;
  assign sw_dqs = ~(pulse & sel);
  assign sw_clk = ~(pulse & ~sel);

  initial begin
    dclk = 1'b1;
    rst0 = 1'b1;
  end
  always @(sw)   dclk <= #(T_DCLK_PS) sw;
  always @(dclk) rst0 <= #(T_RST_PS) dclk;

  assign rst = sw & rst0;
endmodule
