`timescale 1ps/1fs
// dqs_generator: on-chip test source of skewed quadrature DQS strobes.
//
// Four flip-flops in a shift register sample the data input on successive
// rising edges of clk_4x, a clock four times the DQS frequency. A data pattern
// high for two clk_4x cycles and low for two gives four strobes a quarter
// period apart (I, Q, IB, QB = dqs[0..3]); a pattern that toggles only for a
// while gives burst-mode strobes. Each strobe then passes a DCDL whose code,
// set from outside, adds a chosen skew. The flip-flops and DCDLs are the
// design's. This module contains behavioural DCDL models, so it is a
// behavioural model as a whole. The asynchronous reset of the flip-flops is
// this design's choice.
//
// Interface: clk_4x, rst_n, data, skew_code[k] (8-bit DCDL code of strobe k);
// dqs_in[3:0] to the corrector, one DCDL delay after each clk_4x edge.
module dqs_generator
  import qec_pkg::*;
(
  input  logic              clk_4x,
  input  logic              rst_n,
  input  logic              data,
  input  logic [DCDL_W-1:0] skew_code [4],
  output logic [3:0]        dqs_in
);
  logic [3:0] dqs;

  always_ff @(posedge clk_4x or negedge rst_n) begin
    if (!rst_n) dqs <= '0;
    else        dqs <= {dqs[2:0], data};
  end

  for (genvar k = 0; k < 4; k++) begin : g_skew
    dcdl u_dcdl (
      .in   (dqs[k]),
      .code (skew_code[k]),
      .out  (dqs_in[k])
    );
  end
endmodule
