`timescale 1ps/1fs
// tb_dqs_generator: checks the test DQS generator.
// clk_4x runs at 6.4 GHz and data repeats high-high-low-low, so the four
// strobes must come out 156.25 ps apart plus the difference of their DCDL
// delays (40 ps + code[7:4] * 9.6 ps + code[3:0] * 0.65 ps), each rising one
// DCDL delay after the clk_4x edge that samples it. A burst pattern must give
// the same number of pulses on each strobe as data has.
module tb_dqs_generator;
  import qec_pkg::*;
  localparam real T4X = 156.25;
  int checks = 0, failures = 0;
  logic clk_4x = 1'b0, rst_n = 1'b1, data = 1'b0;
  logic [7:0] skew_code [4];
  logic [3:0] dqs_in;
  real t_r [4];
  real t_clk_edge [$];
  int  n_data = 0, n_out [4] = '{0, 0, 0, 0};
  bit  burst = 1'b0;
  int unsigned ph = 0;

  dqs_generator dut (.*);

  function automatic real dly(int c);
    return 40.0 + real'(c / 16) * 9.6 + real'(c % 16) * 0.65;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f", what, $realtime); end
  endtask

  always #(T4X / 2.0) clk_4x = ~clk_4x;
  always @(posedge clk_4x) begin
    ph <= ph + 1;
    if (!burst) data <= ((ph + 1) % 4) < 2;
    else        data <= (((ph + 1) % 40) < 16) && (((ph + 1) % 4) < 2);
  end
  always @(posedge data) n_data++;
  for (genvar k = 0; k < 4; k++) begin : g_m
    always @(posedge dqs_in[k]) begin t_r[k] = $realtime; n_out[k]++; end
  end

  initial begin
    #1 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < 4; k++) skew_code[k] = 8'($urandom_range(60, 200));
      repeat (12) @(posedge clk_4x);
      for (int c = 0; c < 6; c++) begin
        @(posedge dqs_in[3]); #0.01;
        for (int k = 0; k < 3; k++) begin
          real want;
          want = T4X + dly(skew_code[k + 1]) - dly(skew_code[k]);
          check(t_r[k + 1] - t_r[k] > want - 0.01 && t_r[k + 1] - t_r[k] < want + 0.01,
                $sformatf("gap %0d: %0.2f want %0.2f", k, t_r[k + 1] - t_r[k], want));
        end
        // I rises one DCDL delay after a clk_4x rising edge
        begin
          real rel;
          rel = t_r[0] - dly(skew_code[0]) - (T4X / 2.0);
          rel = rel - T4X * $floor(rel / T4X + 0.5);
          check(rel > -0.01 && rel < 0.01, "aligned to clk_4x");
        end
      end
    end
    // burst pattern: each strobe carries the data pulses
    skew_code = '{8'd128, 8'd128, 8'd128, 8'd128};
    burst = 1'b1;
    repeat (80) @(posedge clk_4x);
    n_data = 0; n_out = '{0, 0, 0, 0};
    repeat (400) @(posedge clk_4x);
    repeat (8) @(posedge clk_4x);
    for (int k = 0; k < 4; k++)
      check(n_out[k] >= n_data - 1 && n_out[k] <= n_data + 1, $sformatf("burst pulses lane %0d: %0d of %0d", k, n_out[k], n_data));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
