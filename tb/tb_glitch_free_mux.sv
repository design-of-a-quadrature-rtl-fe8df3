`timescale 1ps/1fs
// tb_glitch_free_mux: checks the glitch-free pulse selection.
// clk_pulse (high 625 ps, low 625 ps) and dqs_pulse (160 ps wide, every
// 625 ps, unrelated phase) run free while sel is changed at random times,
// also in the middle of pulses. Checked: every output pulse has exactly the
// width of a clk_pulse or a dqs_pulse (no cut or merged pulses); while
// sel_sync is low the output follows clk_pulse and while it is high it
// follows dqs_pulse; sel_sync follows sel within a few pulses; the two
// enables are never on together.
module tb_glitch_free_mux;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, sel = 1'b0, clk_pulse = 1'b0, dqs_pulse = 1'b0, pulse, sel_sync;
  real  t_r;
  int   n_clk_w = 0, n_dqs_w = 0, n_switch = 0;

  glitch_free_mux dut (.*);

  always #625 clk_pulse = ~clk_pulse;
  initial begin
    #217;
    forever begin dqs_pulse = 1'b1; #160; dqs_pulse = 1'b0; #465; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f", what, $realtime); end
  endtask

  always @(posedge pulse) t_r = $realtime;
  always @(negedge pulse) if ($realtime > 10.0) begin
    real w;
    bit  is_clk, is_dqs;
    w      = $realtime - t_r;
    is_clk = (w > 624.9 && w < 625.1);
    is_dqs = (w > 159.9 && w < 160.1);
    check(is_clk || is_dqs, $sformatf("output pulse width %0.2f", w));
    if (is_clk) n_clk_w++;
    if (is_dqs) n_dqs_w++;
  end
  always @(pulse or clk_pulse or dqs_pulse) begin
    #0.001;
    if (rst_n && $realtime > 10.0) begin
      check(!(dut.en_clk && dut.en_dqs), "both enables on");
      if (dut.en_clk) check(pulse == clk_pulse, "follows clk_pulse");
      if (dut.en_dqs) check(pulse == dqs_pulse, "follows dqs_pulse");
    end
  end
  always @(sel_sync) n_switch++;

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #5;
    check(pulse == 1'b0 && sel_sync == 1'b0, "reset state");
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      #(real'($urandom_range(3000, 9000)) + 0.37);
      sel = ~sel;
      #(4 * 1250);
      check(sel_sync == sel, "sel_sync follows sel within two clk_pulse periods");
    end
    check(n_clk_w > 0 && n_dqs_w > 0, "both pulse kinds passed");
    check(n_switch >= 40, "switches happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
