`timescale 1ps/1fs
// tb_pulse_generator: checks the complete pulse generator.
// Strobes of period 625 ps with known gaps (I-Q 140 ps, Q-IB 170 ps, IB-QB
// 150 ps) and a 625 ps clock are applied. In CLK mode every output pulse must
// be 625 ps wide (one clock period) and sel_sync low; in DQS mode the pulses
// must be as wide as the selected gap and sel_sync high. Switching modes must
// give no pulse of any other width. With en low no pulses may appear.
module tb_pulse_generator;
  localparam real T_PS = 625.0;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, sel = 1'b0;
  logic [1:0] sel_dqs = 2'd0;
  logic i = 0, q = 0, ib = 0, qb = 0, pulse, sel_sync;
  real  t_r, w_last;
  int   npulse = 0, nbad = 0;
  real  gap [3] = '{140.0, 170.0, 150.0};

  pulse_generator dut (.*);

  always #(T_PS / 2.0) clk = ~clk;
  initial begin
    #33;
    forever begin
      fork
        begin i = 1; #(T_PS / 2.0) i = 0; end
        begin #(gap[0]) q = 1; #(T_PS / 2.0) q = 0; end
        begin #(gap[0] + gap[1]) ib = 1; #(T_PS / 2.0) ib = 0; end
        begin #(gap[0] + gap[1] + gap[2]) qb = 1; #(T_PS / 2.0) qb = 0; end
      join_none
      #(T_PS);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f", what, $realtime); end
  endtask

  always @(posedge pulse) t_r = $realtime;
  always @(negedge pulse) begin
    real w;
    bit  ok;
    w = $realtime - t_r;
    w_last = w;
    npulse++;
    ok = (w > T_PS - 0.01 && w < T_PS + 0.01);
    for (int k = 0; k < 3; k++) ok |= (w > gap[k] - 0.01 && w < gap[k] + 0.01);
    if (!ok) nbad++;
  end

  task automatic expect_width(real want, bit want_sync, string what);
    for (int k = 0; k < 4; k++) begin
      @(negedge pulse); #0.01;
      check(w_last > want - 0.01 && w_last < want + 0.01,
            $sformatf("%s width %0.2f want %0.2f", what, w_last, want));
      check(sel_sync == want_sync, {what, " sel_sync"});
    end
  endtask

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    #1 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    npulse = 0;   // ignore anything seen before the reset
    nbad   = 0;
    #2000;
    check(npulse == 0, "no pulse while disabled");
    en = 1'b1;
    expect_width(T_PS, 1'b0, "CLK mode");
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < 3; s++) begin
        sel_dqs = 2'(s);
        sel     = 1'b1;
        #(3 * 1250);
        expect_width(gap[s], 1'b1, $sformatf("DQS mode pair %0d", s));
        sel = 1'b0;
        #(3 * 1250);
        expect_width(T_PS, 1'b0, "back to CLK mode");
      end
    en = 1'b0;
    #2000;
    n0 = npulse;
    #5000;
    check(npulse == n0, "no pulse after disable");
    check(nbad == 0, $sformatf("%0d pulses of a wrong width", nbad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
