`timescale 1ps/1fs
// tb_clk_pulse_gen: checks the divide-by-two CLK pulse generator.
// With en high, clk_pulse must change on every rising clk edge, so each high
// phase lasts exactly one clock period (625 ps at 1.6 GHz). With en low it must
// return to 0 and stay there. Reference values come from the clock period.
module tb_clk_pulse_gen;
  localparam real T_PS = 625.0;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, clk_pulse;
  real  t_rise;

  clk_pulse_gen dut (.*);

  always #(T_PS / 2.0) clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f ps", what, $realtime); end
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    #1 rst_n = 1'b0;
    #10;
    check(clk_pulse == 1'b0, "reset value");
    rst_n = 1'b1;
    @(negedge clk) en = 1'b1;
    // toggles on each rising edge
    for (int k = 0; k < 20; k++) begin
      prev = clk_pulse;
      @(posedge clk); #1;
      check(clk_pulse == ~prev, "toggle per clock");
    end
    // high time is one period
    for (int k = 0; k < 5; k++) begin
      @(posedge clk_pulse) t_rise = $realtime;
      @(negedge clk_pulse);
      check(($realtime - t_rise) > T_PS - 0.01 && ($realtime - t_rise) < T_PS + 0.01, "pulse width = T");
    end
    // disable
    @(negedge clk) en = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    for (int k = 0; k < 10; k++) begin
      @(posedge clk); #1;
      check(clk_pulse == 1'b0, "held low while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
