`timescale 1ps/1fs
// clk_pulse_gen: CLK pulse generator of the QEC pulse generator.
//
// A flip-flop clocked by clk whose inverted output feeds its D input divides
// clk by two, so clk_pulse is high for exactly one clock period T_clk: the
// pulse-width detector charges its four capacitors for that time in CLK mode.
// The divide-by-two structure follows the design. The enable (the calibration
// switch cal_on) and the asynchronous reset are this design's additions: with
// en low the flip-flop returns to and stays at 0, so no pulses reach the
// feedback loop while calibration is off.
//
// Interface: clk, rst_n (async, active low), en; clk_pulse toggles on each
// rising edge of clk while en is high (one clk cycle latency).
module clk_pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic clk_pulse
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  clk_pulse <= 1'b0;
    else if (en) clk_pulse <= ~clk_pulse;
    else         clk_pulse <= 1'b0;
  end
endmodule
