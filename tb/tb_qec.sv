`timescale 1ps/1fs
// tb_qec: calibration runs of the corrector core across its operating range.
//
// The testbench generates the four strobes itself, with a chosen offset of
// each rising edge from the ideal quarter-period grid, and a clock of the
// same frequency with an unrelated phase. Each run resets the corrector,
// calibrates for a fixed time and then measures the gaps between the rising
// edges of neighbouring corrected strobes over 16 DQS cycles. Every gap must
// be within 8.69 ps of a quarter period (the worst residual error the design
// reports). Runs:
//   - 1.6 GHz, seamless strobes, Q alone offset from -75 ps to +75 ps in
//     25 ps steps (the correctable input range);
//   - 1.0 GHz and 2.0 GHz (ends of the operating range), burst strobes
//     (bursts of four DQS cycles, four idle cycles), with all three of Q, IB
//     and QB offset;
//   - 1.6 GHz, burst strobes, Q alone offset from -75 ps to +75 ps in 25 ps
//     steps (the same sweep with gaps in the strobe train);
//   - 1.0 GHz to 2.0 GHz in 0.2 GHz steps, seamless strobes, Q offset by
//     -75 ps and +75 ps (correctable input error against frequency);
//   - 1.6 GHz, burst and seamless strobes, the design's example skew
//     (neighbour errors +41.87, -20.62 and -40.63 ps).
// The reference is the quarter period of the applied frequency.
module tb_qec;
  import qec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, cal_on = 1'b0;
  logic i_in = 0, q_in = 0, ib_in = 0, qb_in = 0;
  logic i_out, q_out, ib_out, qb_out, sel, sel_sync;
  logic [4:0] dac_ctrl;
  logic [7:0] dcdl_q, dcdl_ib, dcdl_qb;
  stage_e stage;

  qec dut (.*);

  real t_ps  = 625.0;
  real off [4] = '{0.0, 0.0, 0.0, 0.0};
  bit  burst = 1'b0;
  bit  run   = 1'b0;

  // clock
  initial forever begin
    if (run) begin clk = 1'b1; #(t_ps / 2.0); clk = 1'b0; #(t_ps / 2.0); end
    else #100;
  end

  // strobes: cycle n starts at n * T; strobe k rises at k * T/4 + off[k]
  int unsigned ncyc = 0;
  initial forever begin
    if (run) begin
      bit on;
      on = !burst || ((ncyc % 8) < 4);
      if (on) fork
        begin #(100.0 + off[0]);                   i_in  = 1; #(t_ps / 2.0) i_in  = 0; end
        begin #(100.0 + t_ps / 4.0 + off[1]);       q_in  = 1; #(t_ps / 2.0) q_in  = 0; end
        begin #(100.0 + t_ps / 2.0 + off[2]);       ib_in = 1; #(t_ps / 2.0) ib_in = 0; end
        begin #(100.0 + 3.0 * t_ps / 4.0 + off[3]); qb_in = 1; #(t_ps / 2.0) qb_in = 0; end
      join_none
      ncyc++;
      #(t_ps);
    end else #100;
  end

  // gap measurement
  real tr [4];
  real gap [3];
  int  ngap = 0;
  always @(posedge i_out)  tr[0] = $realtime;
  always @(posedge q_out)  tr[1] = $realtime;
  always @(posedge ib_out) tr[2] = $realtime;
  always @(posedge qb_out) begin
    tr[3] = $realtime;
    if (tr[3] - tr[0] < 0.95 * t_ps && tr[1] > tr[0] && tr[2] > tr[1]) begin
      for (int k = 0; k < 3; k++) gap[k] = tr[k + 1] - tr[k];
      ngap++;
    end
  end

  task automatic calibrate_and_check(real f_ghz, bit bst, real o1, real o2, real o3, string what);
    real worst;
    int  n0;
    run    = 1'b0;
    cal_on = 1'b0;
    #3000;
    t_ps   = 1000.0 / f_ghz;
    burst  = bst;
    off    = '{0.0, o1, o2, o3};
    rst_n  = 1'b0;
    #1000;
    rst_n  = 1'b1;
    cal_on = 1'b1;
    run    = 1'b1;
    #(12000.0 * t_ps);
    worst = 0.0;
    n0 = ngap;
    for (int k = 0; k < 16; k++) begin
      @(posedge qb_out); #1;
      for (int j = 0; j < 3; j++) begin
        real e;
        e = gap[j] - t_ps / 4.0;
        if (e < 0) e = -e;
        if (e > worst) worst = e;
      end
    end
    checks++;
    if (ngap == n0 || worst > 8.69) begin
      failures++;
      $display("FAIL %s: worst gap error %0.2f ps", what, worst);
    end else
      $display("ok   %s: worst gap error %0.2f ps, dac=%0d q=%0d ib=%0d qb=%0d", what, worst,
               dac_ctrl, dcdl_q, dcdl_ib, dcdl_qb);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    for (int s = -3; s <= 3; s++)
      calibrate_and_check(1.6, 1'b0, 25.0 * s, 0.0, 0.0, $sformatf("1.6 GHz seamless, Q offset %0d ps", 25 * s));
    for (int s = -3; s <= 3; s++)
      calibrate_and_check(1.6, 1'b1, 25.0 * s, 0.0, 0.0, $sformatf("1.6 GHz burst, Q offset %0d ps", 25 * s));
    for (int f = 10; f <= 20; f += 2) begin
      calibrate_and_check(f / 10.0, 1'b0, -75.0, 0.0, 0.0, $sformatf("%0.1f GHz seamless, Q offset -75 ps", f / 10.0));
      calibrate_and_check(f / 10.0, 1'b0,  75.0, 0.0, 0.0, $sformatf("%0.1f GHz seamless, Q offset +75 ps", f / 10.0));
    end
    calibrate_and_check(1.0, 1'b1, -60.0, 30.0, -20.0, "1.0 GHz burst");
    calibrate_and_check(2.0, 1'b1, 40.0, -30.0, 20.0, "2.0 GHz burst");
    calibrate_and_check(1.6, 1'b1, -41.87, -21.25, 19.38, "1.6 GHz burst, example skew");
    calibrate_and_check(1.6, 1'b0, -41.87, -21.25, 19.38, "1.6 GHz seamless, example skew");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
