`timescale 1ps/1fs
// test_mux: test multiplexer that routes one signal of the corrector to the
// output pad for jitter and skew measurement.
//
// For each lane k a MUX3 picks dqs_in[k], dqs_out[k] or clk; a MUX4 then picks
// one of the four lanes. Picking clk in every lane lets the skew of the MUX4
// paths themselves be measured and removed. The structure and the select
// names sel_mux1[0:11], sel_mux2[0:3] are the design's. The select encoding
// is this design's reading: one-hot, with sel_mux1[3k], [3k+1], [3k+2]
// selecting dqs_in[k], dqs_out[k] and clk of lane k, and sel_mux2[k]
// selecting lane k; an all-zero select gives 0. Combinational.
module test_mux (
  input  logic [3:0]  dqs_in,
  input  logic [3:0]  dqs_out,
  input  logic        clk,
  input  logic [0:11] sel_mux1,
  input  logic [0:3]  sel_mux2,
  output logic        out
);
  logic [3:0] lane;

  always_comb begin
    for (int k = 0; k < 4; k++)
      lane[k] = (sel_mux1[3*k]   & dqs_in[k])
              | (sel_mux1[3*k+1] & dqs_out[k])
              | (sel_mux1[3*k+2] & clk);
    out = 1'b0;
    for (int k = 0; k < 4; k++)
      out = out | (sel_mux2[k] & lane[k]);
  end
endmodule
