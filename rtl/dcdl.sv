`timescale 1ps/1fs
// dcdl: behavioural model of the 8-bit digitally controlled delay line.
//
// This is a behavioural model: the real line is a NAND-chain coarse delay line
// (16 taps selected by a MUX16, unused NAND stages turned off) followed by a
// MOSCAP fine delay line (15 switched capacitors on the node between two
// inverters). The control signals come from the synthesizable dcdl_decoder;
// the model turns them into a delay
//
//   t = T0_PS + (selected coarse tap) * COARSE_PS + (MOSCAPs on) * FINE_PS
//
// and delays every edge of in by the delay valid when the edge arrives, so
// edges already in flight are not moved by a code change. The structure is
// the design's. The step sizes are chosen so that the full range, 15 * 9.6 +
// 15 * 0.65 = 153.75 ps, matches the design's 153 ps, and one coarse step
// (9.6 ps) is smaller than the whole fine range (9.75 ps), as the design
// requires so that no delay is skipped. T0_PS, the insertion delay, is this
// design's choice.
//
// Interface: in, code[7:0]; out. Code 128 is mid-range (76.8 ps above T0).
module dcdl
  import qec_pkg::*;
#(
  parameter real T0_PS     = 40.0,
  parameter real COARSE_PS = 9.6,
  parameter real FINE_PS   = 0.65
) (
  input  logic              in,
  input  logic [DCDL_W-1:0] code,
  output logic              out
);
  logic [CRS_TAPS-2:0]  ctrlc;
  logic [CRS_TAPS-1:0]  sel;
  logic [FINE_CAPS-1:0] ctrlf;
  real                  delay_ps;

  dcdl_decoder u_dec (
    .code  (code),
    .ctrlc (ctrlc),
    .sel   (sel),
    .ctrlf (ctrlf)
  );

  int tap;

  always_comb begin
    tap = 0;
    for (int k = 0; k < CRS_TAPS; k++)
      if (sel[k]) tap = k;
    delay_ps = T0_PS + real'(tap) * COARSE_PS + real'($countones(ctrlf)) * FINE_PS;
  end

  // The NAND chain runs exactly up to the selected tap.
  always_comb
    assert ($onehot(sel) && $countones(ctrlc) == tap) else
      $error("dcdl: inconsistent coarse control");

  // Transport delay: every input edge is queued with its due time, so
  // pulses shorter than the delay pass unchanged.
  real  due_t [$];
  logic due_v [$];
  event kick;

  always @(in) begin
    due_t.push_back($realtime + delay_ps);
    due_v.push_back(in);
    -> kick;
  end

  initial begin
    out = 1'b0;
    forever begin
      if (due_t.size() == 0) @(kick);
      else begin
        if (due_t[0] > $realtime) #(due_t[0] - $realtime);
        out = due_v.pop_front();
        void'(due_t.pop_front());
      end
    end
  end
endmodule
