`timescale 1ps/1fs
// pulse_generator: source of the measurement pulses of the QEC feedback loop.
//
// In CLK mode (sel = 0) it passes clk_pulse, clk divided by two, whose width is
// one clock period. In DQS mode (sel = 1) it passes dqs_pulse, whose width is
// the phase difference of the DQS pair chosen by sel_dqs. The switch between
// the two goes through a glitch-free MUX. The three parts and their roles
// follow the design; the en input (driven by cal_on) that stops both pulse
// sources while calibration is off is this design's way of stopping the loop.
//
// Interface: clk, rst_n, en, sel, sel_dqs[1:0], the four corrected strobes;
// pulse and sel_sync (mode of the pulse now passed) go to the pulse-width
// detector and the DIV8 & 3-bit counter.
module pulse_generator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       sel,
  input  logic [1:0] sel_dqs,
  input  logic       i,
  input  logic       q,
  input  logic       ib,
  input  logic       qb,
  output logic       pulse,
  output logic       sel_sync
);
  logic clk_pulse, dqs_pulse;

  clk_pulse_gen u_clk_pg (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .clk_pulse (clk_pulse)
  );

  dqs_pulse_gen u_dqs_pg (
    .i         (i),
    .q         (q),
    .ib        (ib),
    .qb        (qb),
    .sel_dqs   (sel_dqs),
    .en        (en),
    .dqs_pulse (dqs_pulse)
  );

  glitch_free_mux u_gfm (
    .rst_n     (rst_n),
    .sel       (sel),
    .clk_pulse (clk_pulse),
    .dqs_pulse (dqs_pulse),
    .pulse     (pulse),
    .sel_sync  (sel_sync)
  );
endmodule
