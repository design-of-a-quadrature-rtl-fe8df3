`timescale 1ps/1fs
// tb_digital_loop_filter: checks the calibration flow of the loop filter.
// The testbench closes the loop with an ideal detector: in CLK mode a window
// gives dout = 7 when the IDAC code is above a target current code, else 0;
// in DQS mode dout = 7 when the DCDL code of the strobe being adjusted is
// above its target (that strobe is late), else 0. Checked:
//   - the SAR finds the IDAC target exactly in 5 decisions after the one
//     window discarded at reset;
//   - stages come in the order SAR, DAC vote, then Q, IB, QB twice, then DAC
//     vote again, each visit lasting one discarded window plus four votes
//     (the first DAC visit, entered without a mode change, four votes);
//   - sel and sel_dqs match the stage;
//   - every code moves by at most one step per clk_lf edge and only in its
//     own stage, and ends within one step of its target;
//   - windows with 3 or 4 ones (no majority) never move a code;
//   - with cal_on low nothing changes; after cal_on returns one window is
//     discarded and the flow goes on from the same stage.
module tb_digital_loop_filter;
  import qec_pkg::*;
  int checks = 0, failures = 0;
  logic clk_lf = 1'b0, rst_n = 1'b1, cal_on = 1'b1;
  logic [2:0] dout = 3'd0;
  logic [4:0] dac_ctrl;
  logic [7:0] dcdl_q, dcdl_ib, dcdl_qb;
  logic sel;
  logic [1:0] sel_dqs;
  stage_e stage;

  digital_loop_filter dut (.*);

  int  dac_t = 19, q_t = 181, ib_t = 97, qb_t = 143;
  bit  no_majority = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f ns", what, $realtime / 1000.0); end
  endtask

  always #5000 clk_lf = ~clk_lf;

  // ideal detector, presenting the window result before the next rising edge
  always @(negedge clk_lf) begin
    bit hi;
    unique case (stage)
      ST_SAR, ST_DAC_MV: hi = (int'(dac_ctrl) > dac_t);
      ST_Q_MV:           hi = (int'(dcdl_q)  > q_t);
      ST_IB_MV:          hi = (int'(dcdl_ib) > ib_t);
      default:           hi = (int'(dcdl_qb) > qb_t);
    endcase
    dout <= no_majority ? 3'($urandom_range(3, 4)) : (hi ? 3'd7 : 3'd0);
  end

  // per-edge rules
  stage_e ps;
  logic [4:0] pdac;
  logic [7:0] pq, pib, pqb;
  stage_e visits [$];
  int     dwell [$];
  int     nedge = 0;
  always @(posedge clk_lf) begin
    ps = stage; pdac = dac_ctrl; pq = dcdl_q; pib = dcdl_ib; pqb = dcdl_qb;
    #1;
    if (rst_n) begin
      nedge++;
      if (visits.size() == 0 || visits[$] != stage) begin
        visits.push_back(stage);
        dwell.push_back(1);
      end else dwell[$] = dwell[$] + 1;
      if (ps != ST_SAR)
        check(int'(dac_ctrl) - int'(pdac) <= 1 && int'(pdac) - int'(dac_ctrl) <= 1, "IDAC step of one");
      check(dcdl_q  == pq  || (ps == ST_Q_MV  && (dcdl_q  == pq + 1  || dcdl_q  == pq - 1)),  "Q step");
      check(dcdl_ib == pib || (ps == ST_IB_MV && (dcdl_ib == pib + 1 || dcdl_ib == pib - 1)), "IB step");
      check(dcdl_qb == pqb || (ps == ST_QB_MV && (dcdl_qb == pqb + 1 || dcdl_qb == pqb - 1)), "QB step");
      check(dac_ctrl == pdac || ps inside {ST_SAR, ST_DAC_MV}, "IDAC moves only in CLK mode");
      if (no_majority || !cal_on)
        check(dac_ctrl == pdac && dcdl_q == pq && dcdl_ib == pib && dcdl_qb == pqb, "hold without majority / cal off");
      check(sel == (stage inside {ST_Q_MV, ST_IB_MV, ST_QB_MV}), "sel matches stage");
      if (stage == ST_Q_MV)  check(sel_dqs == 2'd0, "sel_dqs Q");
      if (stage == ST_IB_MV) check(sel_dqs == 2'd1, "sel_dqs IB");
      if (stage == ST_QB_MV) check(sel_dqs == 2'd2, "sel_dqs QB");
    end
  end

  initial begin
    #40000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stage_e want [$];
    #1 rst_n = 1'b0;
    #5;
    check(dac_ctrl == 5'd16 && dcdl_q == 8'd128 && dcdl_ib == 8'd128 && dcdl_qb == 8'd128 && stage == ST_SAR,
          "reset values");
    @(negedge clk_lf) rst_n = 1'b1;
    // SAR: discarded window + 5 decisions
    repeat (6) @(posedge clk_lf);
    #2;
    check(int'(dac_ctrl) == dac_t, $sformatf("SAR result %0d want %0d", dac_ctrl, dac_t));
    check(stage == ST_DAC_MV, "SAR ends in DAC vote stage");
    // run 12 full cycles (each: DAC 4/5 + 6 DCDL visits of 5 edges)
    repeat (12 * 35) @(posedge clk_lf);
    #2;
    check(int'(dac_ctrl) - dac_t inside {0, 1}, "IDAC near target");
    check(int'(dcdl_q)  - q_t  inside {-1, 0, 1}, $sformatf("Q %0d near target %0d", dcdl_q, q_t));
    check(int'(dcdl_ib) - ib_t inside {-1, 0, 1}, $sformatf("IB %0d near target %0d", dcdl_ib, ib_t));
    check(int'(dcdl_qb) - qb_t inside {-1, 0, 1}, $sformatf("QB %0d near target %0d", dcdl_qb, qb_t));
    // stage order and dwell
    want = '{ST_SAR, ST_DAC_MV};
    for (int c = 0; c < 12; c++) begin
      want.push_back(ST_Q_MV); want.push_back(ST_IB_MV); want.push_back(ST_QB_MV);
      want.push_back(ST_Q_MV); want.push_back(ST_IB_MV); want.push_back(ST_QB_MV);
      want.push_back(ST_DAC_MV);
    end
    for (int v = 0; v + 1 < visits.size() && v < want.size(); v++) begin
      int wd;
      wd = (v == 0) ? 5 : (v == 1) ? 4 : 5;
      check(visits[v] == want[v], $sformatf("visit %0d stage %0d want %0d", v, visits[v], want[v]));
      check(dwell[v] == wd, $sformatf("visit %0d dwell %0d want %0d", v, dwell[v], wd));
    end
    check(visits.size() > 60, "enough visits");
    // no majority: nothing moves for a whole cycle
    @(negedge clk_lf) no_majority = 1'b1;
    repeat (40) @(posedge clk_lf);
    @(negedge clk_lf) no_majority = 1'b0;
    // cal_on low: frozen
    begin
      stage_e s0;
      q_t = 60;   // a new target that would move Q
      @(negedge clk_lf) cal_on = 1'b0;
      s0 = stage;
      repeat (50) @(posedge clk_lf);
      #2 check(stage == s0, "stage frozen while cal_on low");
      @(negedge clk_lf) cal_on = 1'b1;
      @(posedge clk_lf); #2;
      check(stage == s0, "first window after cal_on discarded");
      repeat (60 * 35) @(posedge clk_lf);
      #2 check(int'(dcdl_q) - q_t inside {-1, 0, 1}, $sformatf("Q follows new target after resume (%0d)", dcdl_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
