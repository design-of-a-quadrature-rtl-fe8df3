`timescale 1ps/1fs
// qec: quadrature error corrector for the four DQS strobes of an HBM3 read
// path.
//
// Main path: I passes a fixed delay line; Q, IB and QB pass 8-bit DCDLs. The
// feedback loop measures the corrected outputs and moves the three DCDL codes
// until every neighbouring pair (I-Q, Q-IB, IB-QB) is a quarter of the clock
// period apart. It does so without relying on the strobes being periodic,
// so it works in burst mode: the pulse-width detector first stores the clock
// period as an IDAC code (CLK mode, four capacitors charged for one period by
// clk_pulse), then compares each DQS phase gap with a quarter of it (DQS mode,
// one capacitor charged for the gap by dqs_pulse). The DIV8 & 3-bit counter
// turns the detector decisions into a 3-bit count per eight pulses and the
// clock clk_lf of the digital loop filter, which runs the SAR and
// majority-vote flow. With cal_on low no pulses are made, the loop stops and
// the DCDL codes stay fixed; the main path keeps running.
//
// The blocks and their connections follow the design's block diagram. The
// loop filter's reset values, the sharing of cal_on as the pulse-source and
// IDAC enable, and the timing constants of the behavioural models are this
// design's choices. The module holds behavioural models (delay lines,
// detector), so it simulates but is not synthesizable as a whole.
//
// Interface: clk (same frequency as the strobes), rst_n (async), cal_on,
// i_in/q_in/ib_in/qb_in; corrected strobes and, for observation, the codes,
// the mode and the loop-filter stage.
module qec
  import qec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cal_on,
  input  logic              i_in,
  input  logic              q_in,
  input  logic              ib_in,
  input  logic              qb_in,
  output logic              i_out,
  output logic              q_out,
  output logic              ib_out,
  output logic              qb_out,
  output logic [DAC_W-1:0]  dac_ctrl,
  output logic [DCDL_W-1:0] dcdl_q,
  output logic [DCDL_W-1:0] dcdl_ib,
  output logic [DCDL_W-1:0] dcdl_qb,
  output logic              sel,
  output logic              sel_sync,
  output stage_e            stage
);
  logic             pulse, d, clk_lf, rst_d;
  logic [1:0]       sel_dqs;
  logic [CNT_W-1:0] dout;

  // Main path
  fixed_delay_line u_dl_i  (.in(i_in), .out(i_out));
  dcdl             u_dl_q  (.in(q_in),  .code(dcdl_q),  .out(q_out));
  dcdl             u_dl_ib (.in(ib_in), .code(dcdl_ib), .out(ib_out));
  dcdl             u_dl_qb (.in(qb_in), .code(dcdl_qb), .out(qb_out));

  // Feedback loop
  pulse_generator u_pg (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (cal_on),
    .sel      (sel),
    .sel_dqs  (sel_dqs),
    .i        (i_out),
    .q        (q_out),
    .ib       (ib_out),
    .qb       (qb_out),
    .pulse    (pulse),
    .sel_sync (sel_sync)
  );

  pulse_width_detector u_pwd (
    .rst_n    (rst_n),
    .en       (cal_on),
    .pulse    (pulse),
    .sel_sync (sel_sync),
    .dac_ctrl (dac_ctrl),
    .d        (d)
  );

  div8_counter u_div8 (
    .rst_n  (rst_n),
    .pulse  (pulse),
    .d      (d),
    .clk_lf (clk_lf),
    .dout   (dout),
    .rst_d  (rst_d)
  );

  digital_loop_filter u_dlf (
    .clk_lf   (clk_lf),
    .rst_n    (rst_n),
    .cal_on   (cal_on),
    .dout     (dout),
    .dac_ctrl (dac_ctrl),
    .dcdl_q   (dcdl_q),
    .dcdl_ib  (dcdl_ib),
    .dcdl_qb  (dcdl_qb),
    .sel      (sel),
    .sel_dqs  (sel_dqs),
    .stage    (stage)
  );

  wire unused_rst_d = rst_d;
endmodule
