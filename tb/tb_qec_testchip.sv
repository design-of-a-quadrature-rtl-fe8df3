`timescale 1ps/1fs
// tb_qec_testchip: end-to-end test of the corrector on its test chip, with
// every parameter at its default.
//
// The DQS generator is driven at 1.6 GHz (clk_4x 6.4 GHz) and its delay lines
// give the four strobes the skew of the design's example: I-Q, Q-IB and IB-QB
// gaps 41.87 ps short, 20.62 ps long and 40.63 ps long of the ideal 156.25 ps.
// The testbench then:
//   1. calibrates in seamless mode and checks that every corrected gap is
//      within 10 ps of a quarter period;
//   2. drops cal_on and checks that the codes stay fixed and the outputs stay
//      corrected while the loop is off;
//   3. raises cal_on again and checks that the loop resumes and stays locked;
//   4. switches to burst mode (bursts of 8 DQS cycles separated by idle time),
//      applies a new skew and checks that the loop corrects it there too;
//   5. checks the test MUX routes a generated strobe, a corrected strobe and
//      the clock.
// Gaps are measured between rising edges of neighbouring corrected strobes
// in the same DQS cycle; the reference values are computed here from the
// clock period alone. It counts how often each mechanism of the loop
// happened (SAR steps, IDAC votes that moved the code, DCDL updates of Q, IB
// and QB, CLK-to-DQS and DQS-to-CLK mode switches, the second DCDL round,
// calibration off and on, burst-mode pulses) and fails for one that never
// happened.
module tb_qec_testchip;
  import qec_pkg::*;

  localparam real T_PS   = 625.0;          // 1.6 GHz
  localparam real T4_PS  = T_PS / 4.0;
  localparam real TOL_PS = 10.0;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, clk_4x = 1'b0, rst_n = 1'b1, data = 1'b0, cal_on = 1'b0;
  logic [DCDL_W-1:0] skew_code [4];
  logic [0:11]       sel_mux1 = '0;
  logic [0:3]        sel_mux2 = '0;
  logic              test_out, sel, sel_sync;
  logic [3:0]        dqs_in, dqs_out;
  logic [DAC_W-1:0]  dac_ctrl;
  logic [DCDL_W-1:0] dcdl_q, dcdl_ib, dcdl_qb;
  stage_e            stage;

  qec_testchip dut (.*);

  // ---------------- clocks and data pattern ----------------
  always #(T_PS / 8.0) clk_4x = ~clk_4x;
  int unsigned ph = 0;          // clk_4x cycle count
  bit          burst = 1'b0;
  always @(posedge clk_4x) begin
    ph  <= ph + 1;
    clk <= ((ph + 1) % 4) < 2;
    // seamless: 2 high, 2 low; burst: 8 DQS cycles on, 8 off
    if (!burst) data <= ((ph + 1) % 4) < 2;
    else        data <= (((ph + 1) % 64) < 32) && (((ph + 1) % 4) < 2);
  end

  // ---------------- skew: codes nearest to a wanted extra delay ----------
  function automatic real dcdl_delay(int code);
    return 40.0 + real'(code / 16) * 9.6 + real'(code % 16) * 0.65;
  endfunction
  function automatic logic [7:0] code_for(real offset_ps);
    real best = 1.0e9; int bc = 128;
    for (int c = 0; c < 256; c++) begin
      real e = dcdl_delay(c) - (dcdl_delay(128) + offset_ps);
      if (e < 0) e = -e;
      if (e < best) begin best = e; bc = c; end
    end
    return 8'(bc);
  endfunction
  task automatic set_skew(real eq, real eib, real eqb);
    // eq, eib, eqb: extra delay of Q, IB, QB relative to I
    skew_code[0] = 8'd128;
    skew_code[1] = code_for(eq);
    skew_code[2] = code_for(eib);
    skew_code[3] = code_for(eqb);
  endtask

  // ---------------- gap measurement on the corrected strobes -------------
  real t_rise [4];
  real gap [3];
  int  ngap = 0;
  always @(posedge dqs_out[0]) t_rise[0] = $realtime;
  always @(posedge dqs_out[1]) t_rise[1] = $realtime;
  always @(posedge dqs_out[2]) t_rise[2] = $realtime;
  always @(posedge dqs_out[3]) begin
    t_rise[3] = $realtime;
    // only complete quartets of the same DQS cycle
    if (t_rise[3] - t_rise[0] < 0.9 * T_PS && t_rise[1] > t_rise[0] && t_rise[2] > t_rise[1]) begin
      gap[0] = t_rise[1] - t_rise[0];
      gap[1] = t_rise[2] - t_rise[1];
      gap[2] = t_rise[3] - t_rise[2];
      ngap++;
    end
  end

  task automatic check_gaps(string what);
    int n0 = ngap;
    real worst = 0.0;
    for (int k = 0; k < 16; k++) begin
      @(posedge dqs_out[3]); #1;
      for (int j = 0; j < 3; j++) begin
        real e = gap[j] - T4_PS;
        if (e < 0) e = -e;
        if (e > worst) worst = e;
      end
    end
    checks++;
    if (ngap == n0 || worst > TOL_PS) begin
      failures++;
      $display("FAIL %s: worst gap error %0.2f ps (gaps %0.2f %0.2f %0.2f)", what, worst, gap[0], gap[1], gap[2]);
    end else
      $display("ok   %s: worst gap error %0.2f ps (gaps %0.2f %0.2f %0.2f) dac=%0d q=%0d ib=%0d qb=%0d",
               what, worst, gap[0], gap[1], gap[2], dac_ctrl, dcdl_q, dcdl_ib, dcdl_qb);
  endtask

  // ---------------- mechanism counters ----------------
  int n_sar = 0, n_dac_mv = 0, n_q = 0, n_ib = 0, n_qb = 0, n_to_dqs = 0, n_to_clk = 0;
  int n_round2 = 0, n_cal_off = 0, n_cal_on = 0, n_burst_pulses = 0, n_sync_sw = 0;
  stage_e prev_stage = ST_SAR;
  logic [DAC_W-1:0] prev_dac;
  logic [7:0] prev_q, prev_ib, prev_qb;
  logic prev_sel = 1'b0, prev_sync = 1'b0, prev_cal = 1'b0;
  always @(posedge dut.u_qec.clk_lf) begin
    #1;
    if (rst_n) begin
      if (prev_stage == ST_SAR && prev_dac != dac_ctrl) n_sar++;
      if (prev_stage == ST_DAC_MV && prev_dac != dac_ctrl) n_dac_mv++;
      if (prev_q  != dcdl_q)  n_q++;
      if (prev_ib != dcdl_ib) n_ib++;
      if (prev_qb != dcdl_qb) n_qb++;
      if (prev_stage == ST_QB_MV && stage == ST_Q_MV) n_round2++;
    end
    prev_stage = stage; prev_dac = dac_ctrl;
    prev_q = dcdl_q; prev_ib = dcdl_ib; prev_qb = dcdl_qb;
  end
  always @(sel) begin
    if (rst_n && sel && !prev_sel) n_to_dqs++;
    if (rst_n && !sel && prev_sel) n_to_clk++;
    prev_sel = sel;
  end
  always @(sel_sync) begin
    if (rst_n && sel_sync != prev_sync) n_sync_sw++;
    prev_sync = sel_sync;
  end
  always @(cal_on) begin
    if (rst_n && !cal_on && prev_cal) n_cal_off++;
    if (rst_n && cal_on && !prev_cal) n_cal_on++;
    prev_cal = cal_on;
  end
  always @(posedge dut.u_qec.pulse) if (burst && sel_sync) n_burst_pulses++;
  int  n_pulses_off = 0;
  real t_off = 0.0;
  always @(posedge dut.u_qec.pulse) if (rst_n && !cal_on && $realtime > t_off + 2000.0) n_pulses_off++;

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("mechanism %-26s %0d", what, n);
  endtask

  task automatic wait_ns(int ns);
    repeat (ns) #1000;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  logic [DAC_W-1:0]  h_dac;
  logic [DCDL_W-1:0] h_q, h_ib, h_qb;
  initial begin
    // Q early by 41.87 ps, then Q-IB 20.62 ps and IB-QB 40.63 ps long.
    set_skew(-41.87, -41.87 + 20.62, -41.87 + 20.62 + 40.63);
    #1 rst_n = 1'b0;   // a falling edge for the asynchronous resets
    wait_ns(5);
    rst_n  = 1'b1;
    cal_on = 1'b1;

    // 1. seamless calibration
    wait_ns(6000);
    check_gaps("seamless after calibration");
    checks++;
    if (!(dac_ctrl inside {[5'd19:5'd24]})) begin
      failures++; $display("FAIL IDAC code %0d, expected near 21-22 for 1.6 GHz", dac_ctrl);
    end

    // 2. calibration off: codes frozen, correction kept
    @(negedge dut.u_qec.clk_lf);
    cal_on = 1'b0;
    t_off  = $realtime;
    #2000;
    h_dac = dac_ctrl; h_q = dcdl_q; h_ib = dcdl_ib; h_qb = dcdl_qb;
    wait_ns(1000);
    checks++;
    if (h_dac != dac_ctrl || h_q != dcdl_q || h_ib != dcdl_ib || h_qb != dcdl_qb) begin
      failures++; $display("FAIL codes moved while cal_on was low");
    end
    checks++;
    if (n_pulses_off != 0) begin failures++; $display("FAIL %0d pulses while cal_on low", n_pulses_off); end
    check_gaps("calibration off");

    // 3. calibration on again
    cal_on = 1'b1;
    wait_ns(2000);
    check_gaps("calibration resumed");

    // 4. burst mode with a new skew
    burst = 1'b1;
    set_skew(30.0, 30.0 - 25.0, 30.0 - 25.0 + 35.0);
    wait_ns(14000);
    check_gaps("burst mode after new skew");

    // 5. test MUX
    sel_mux2 = '0; sel_mux2[2] = 1'b1;  // lane 2
    sel_mux1 = '0; sel_mux1[6] = 1'b1;  // dqs_in[2]
    #3;
    checks++; if (test_out !== dqs_in[2]) begin failures++; $display("FAIL test mux dqs_in"); end
    sel_mux1 = '0; sel_mux1[7] = 1'b1;  // dqs_out[2]
    #3;
    checks++; if (test_out !== dqs_out[2]) begin failures++; $display("FAIL test mux dqs_out"); end
    sel_mux1 = '0; sel_mux1[8] = 1'b1;  // clk
    #3;
    checks++; if (test_out !== clk) begin failures++; $display("FAIL test mux clk"); end

    need("SAR steps", n_sar);
    need("IDAC majority-vote moves", n_dac_mv);
    need("Q DCDL updates", n_q);
    need("IB DCDL updates", n_ib);
    need("QB DCDL updates", n_qb);
    need("CLK to DQS mode switches", n_to_dqs);
    need("DQS to CLK mode switches", n_to_clk);
    need("second DCDL rounds", n_round2);
    need("glitch-free MUX switches", n_sync_sw);
    need("calibration off", n_cal_off);
    need("calibration on again", n_cal_on);
    need("burst-mode DQS pulses", n_burst_pulses);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
