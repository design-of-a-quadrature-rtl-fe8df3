`timescale 1ps/1fs
// fixed_delay_line: behavioural model of the fixed delay line of the I strobe.
//
// This is a behavioural model. In the main path, I is the reference phase: it
// passes a delay line of fixed delay while Q, IB and QB pass 8-bit DCDLs that
// the loop adjusts. Every edge of in appears at out DELAY_PS later. The
// default, 116.8 ps, equals a DCDL at its mid code 128 (40 ps + 8 * 9.6 ps),
// so with all codes at 128 the four paths are matched and each DCDL can move
// its strobe about 77 ps either way. That matching value is this design's
// choice; the fixed line itself is the design's.
module fixed_delay_line #(
  parameter real DELAY_PS = 116.8
) (
  input  logic in,
  output logic out
);
  // Transport delay: every input edge is queued with its due time, so
  // pulses shorter than the delay pass unchanged.
  real  due_t [$];
  logic due_v [$];
  event kick;

  always @(in) begin
    due_t.push_back($realtime + DELAY_PS);
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
