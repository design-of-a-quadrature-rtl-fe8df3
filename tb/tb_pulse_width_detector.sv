`timescale 1ps/1fs
// tb_pulse_width_detector: checks the pulse-width detector model.
// For random IDAC codes and pulse widths, in CLK mode (4 x 24 fF) and DQS
// mode (24 fF), d after the pulse must equal (I * t / C > 0.55 V), with I
// computed here from the IDAC law (36 uA + 2.2 uA per unit, code + 1 units).
// It also checks the key property of the design: with the code that puts a
// 625 ps CLK-mode charge just above the threshold, a DQS-mode pulse just
// above a quarter of that (with the same code) gives d = 1 and just below
// gives d = 0. d must be valid 30 ps after the pulse ends.
module tb_pulse_width_detector;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, en = 1'b1, pulse = 1'b0, sel_sync = 1'b0, d;
  logic [4:0] dac_ctrl = 5'd0;

  pulse_width_detector dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f", what, $realtime); end
  endtask

  function automatic real cur(int code);
    return 36.0 + 2.2 * real'(code + 1);
  endfunction

  task automatic apply(int code, bit dqs, real w);
    dac_ctrl = 5'(code);
    sel_sync = dqs;
    #50;
    pulse = 1'b1;
    #(w);
    pulse = 1'b0;
    #40;   // after dclk (30 ps)
  endtask

  initial begin
    real v, c;
    bit  want;
    int  code16;
    #1 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    check(d == 1'b0, "reset");
    #100;
    for (int k = 0; k < 300; k++) begin
      int  code;
      bit  dqs;
      real w;
      code = $urandom_range(0, 31);
      dqs  = 1'($urandom);
      w    = dqs ? real'($urandom_range(80, 260)) + 0.3 : real'($urandom_range(400, 1100)) + 0.3;
      c = dqs ? 24.0 : 96.0;
      v = cur(code) * w / c * 1.0e-3;
      if (v > 0.545 && v < 0.555) continue;   // keep clear of the threshold
      want = (v > 0.55);
      apply(code, dqs, w);
      check(d == want, $sformatf("code %0d dqs %0d width %0.1f: d %0d want %0d", code, dqs, w, d, want));
      #200;
    end
    // quarter-period property at 1.6 GHz
    code16 = 0;
    while (code16 < 31 && cur(code16) * 625.0 / 96.0 * 1.0e-3 <= 0.55) code16++;
    apply(code16, 1'b0, 625.0);
    check(d == 1'b1, "CLK mode at the found code is above threshold");
    apply(code16, 1'b1, 625.0 / 4.0 + 0.5);
    check(d == 1'b1, "DQS pulse just over T/4 gives 1");
    apply(code16, 1'b1, 625.0 / 4.0 * cur(code16 - 1) / cur(code16) - 0.5);
    check(d == 1'b0, "DQS pulse one IDAC step under T/4 gives 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
