`timescale 1ps/1fs
// qec_testchip: the quadrature error corrector with its on-chip test circuits.
//
// A DQS generator makes four quadrature strobes from a data pattern and a
// 4x clock and skews them with its own DCDLs; the corrector removes the
// skew; a test MUX brings one generated strobe, one corrected strobe or the
// clock to a single output for measurement. The control inputs (skew codes,
// cal_on, MUX selects) are plain ports: on the prototype a serial control
// block sets them. Which circuits sit together on the chip is the design's;
// the port list is this design's choice.
//
// Interface: clk (strobe-rate clock), clk_4x, rst_n, data, skew_code[4],
// cal_on, sel_mux1[0:11], sel_mux2[0:3]; test_out, both strobe sets and the
// corrector's codes and stage for observation.
module qec_testchip
  import qec_pkg::*;
(
  input  logic              clk,
  input  logic              clk_4x,
  input  logic              rst_n,
  input  logic              data,
  input  logic [DCDL_W-1:0] skew_code [4],
  input  logic              cal_on,
  input  logic [0:11]       sel_mux1,
  input  logic [0:3]        sel_mux2,
  output logic              test_out,
  output logic [3:0]        dqs_in,
  output logic [3:0]        dqs_out,
  output logic [DAC_W-1:0]  dac_ctrl,
  output logic [DCDL_W-1:0] dcdl_q,
  output logic [DCDL_W-1:0] dcdl_ib,
  output logic [DCDL_W-1:0] dcdl_qb,
  output logic              sel,
  output logic              sel_sync,
  output stage_e            stage
);
  dqs_generator u_gen (
    .clk_4x    (clk_4x),
    .rst_n     (rst_n),
    .data      (data),
    .skew_code (skew_code),
    .dqs_in    (dqs_in)
  );

  qec u_qec (
    .clk      (clk),
    .rst_n    (rst_n),
    .cal_on   (cal_on),
    .i_in     (dqs_in[0]),
    .q_in     (dqs_in[1]),
    .ib_in    (dqs_in[2]),
    .qb_in    (dqs_in[3]),
    .i_out    (dqs_out[0]),
    .q_out    (dqs_out[1]),
    .ib_out   (dqs_out[2]),
    .qb_out   (dqs_out[3]),
    .dac_ctrl (dac_ctrl),
    .dcdl_q   (dcdl_q),
    .dcdl_ib  (dcdl_ib),
    .dcdl_qb  (dcdl_qb),
    .sel      (sel),
    .sel_sync (sel_sync),
    .stage    (stage)
  );

  test_mux u_tmux (
    .dqs_in   (dqs_in),
    .dqs_out  (dqs_out),
    .clk      (clk),
    .sel_mux1 (sel_mux1),
    .sel_mux2 (sel_mux2),
    .out      (test_out)
  );
endmodule
