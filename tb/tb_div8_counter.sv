`timescale 1ps/1fs
// tb_div8_counter: checks DIV8 and the 3-bit counter.
// Pulses of random period are applied together with a random decision d per
// pulse (d changes after each pulse falls, as the detector's flip-flop does).
// Checked: clk_lf has one rising edge per eight pulses; at each rising clk_lf
// edge dout equals the number of ones among the decisions of the seven
// pulses that began at the previous rising clk_lf edge, counted
// independently here; rst_d is high for exactly one pulse in eight.
module tb_div8_counter;
  import qec_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, pulse = 1'b0, d = 1'b0, clk_lf, rst_d;
  logic [2:0] dout;

  div8_counter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f", what, $realtime); end
  endtask

  // reference: decisions of pulses since the last clk_lf edge
  bit  dq [$];
  int  pulses_since = 0, n_lf = 0, n_rstd_pulses = 0;
  always @(posedge clk_lf) begin
    int exp_cnt;
    #0.01;
    n_lf++;
    if (n_lf > 1) begin
      check(pulses_since == 8, $sformatf("clk_lf every 8 pulses (%0d)", pulses_since));
      exp_cnt = 0;
      for (int k = 0; k < 7; k++) exp_cnt += dq[k];
      check(dout == 3'(exp_cnt), $sformatf("dout %0d want %0d", dout, exp_cnt));
    end
    dq.delete();
    pulses_since = 0;
  end

  initial begin
    #3000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit dn;
    #1 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    #100;
    for (int p = 0; p < 800; p++) begin
      pulse = 1'b1;
      pulses_since++;
      #(real'($urandom_range(100, 700)));
      pulse = 1'b0;
      if (rst_d) n_rstd_pulses++;
      // detector decision for this pulse appears after the pulse
      dn = ($urandom_range(0, 99) < (p % 100));
      #30 d = dn;
      dq.push_back(dn);
      #(real'($urandom_range(100, 1500)));
    end
    check(n_lf >= 99, "clk_lf count");
    check(n_rstd_pulses >= 99 && n_rstd_pulses <= 101, $sformatf("rst_d pulses %0d", n_rstd_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
