`timescale 1ps/1fs
// digital_loop_filter: calibration controller of the quadrature error corrector.
//
// Runs on clk_lf (the measurement pulse divided by eight). At each rising edge
// dout holds how many of the last seven pulse-width decisions were 1 (the
// capacitor voltage was above the comparator threshold). The flow is:
//
//   ST_SAR     CLK mode. 5-bit successive approximation of the IDAC code,
//              MSB first, one window per bit: a trial bit is kept when the
//              majority of the window says the voltage stayed below the
//              threshold, and cleared otherwise.
//   ST_DAC_MV  CLK mode. Majority vote on the IDAC code: +1 when at least
//              MV_TH decisions were 0, -1 when at least MV_TH were 1, else
//              hold. Four votes (lsb_num_cnt 0..3), then DQS mode.
//   ST_Q_MV, ST_IB_MV, ST_QB_MV
//              DQS mode, pair I-Q, Q-IB, IB-QB. Majority vote on the DCDL code
//              of the later strobe of the pair: a 1 means the pulse (the phase
//              gap) was longer than a quarter clock period, so that strobe is
//              late and its delay is reduced. Four votes each.
//   After QB the Q-IB-QB round runs once more (dcdl_update_num_cnt), then
//   the flow returns to ST_DAC_MV and repeats while cal_on is high.
//
// The SAR-then-majority-vote flow, the MSB-first 5-bit SAR, the vote
// threshold of 5, the stage exit at lsb_num_cnt == 3, the Q, IB, QB order and
// the second DCDL round (dcdl_update_num_cnt) follow the design's flowchart.
// This design's own choices: seven counted decisions per window (the 3-bit
// dout cannot hold eight); the vote and SAR polarity above; one window
// discarded after reset, after every change of sel or sel_dqs and after
// cal_on was seen low, because that window mixes pulses of two kinds; codes
// saturate at their ends; reset values DCDL = 128 and IDAC = 16 (SAR trial).
// With cal_on low every register holds, so the delay-line codes stay fixed,
// and when cal_on returns the flow resumes from where it stopped.
//
// Interface: clk_lf, rst_n (async), cal_on, dout[2:0]; outputs dac_ctrl[4:0],
// dcdl_q/ib/qb[7:0], sel (1 = DQS mode), sel_dqs[1:0] and the stage. Every
// output changes right after a rising clk_lf edge.
module digital_loop_filter
  import qec_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 7,   // decisions counted per window
  parameter int unsigned MV_TH     = 5,   // majority-vote threshold
  parameter int unsigned MV_VOTES  = 4,   // votes per stage (lsb_num_cnt 0..3)
  parameter int unsigned DCDL_ROUNDS = 2  // Q-IB-QB rounds per DAC stage
) (
  input  logic              clk_lf,
  input  logic              rst_n,
  input  logic              cal_on,
  input  logic [CNT_W-1:0]  dout,
  output logic [DAC_W-1:0]  dac_ctrl,
  output logic [DCDL_W-1:0] dcdl_q,
  output logic [DCDL_W-1:0] dcdl_ib,
  output logic [DCDL_W-1:0] dcdl_qb,
  output logic              sel,
  output logic [1:0]        sel_dqs,
  output stage_e            stage
);
  logic [2:0] sar_idx;
  logic [1:0] lsb_num_cnt;
  logic       dcdl_update_num_cnt;
  logic       skip;
  logic       vote_up, vote_dn, sar_low;

  assign vote_dn = (int'(dout) >= int'(MV_TH));
  assign vote_up = (int'(N_SAMPLES) - int'(dout) >= int'(MV_TH));
  assign sar_low = (2 * int'(dout) < int'(N_SAMPLES));   // majority below threshold

  // Codes move by one step and stop at their ends.
  function automatic logic [DCDL_W-1:0] step_dcdl(logic [DCDL_W-1:0] c,
                                                  logic up, logic dn);
    if (up && c != '1)      return c + 1'b1;
    else if (dn && c != '0) return c - 1'b1;
    else                    return c;
  endfunction

  function automatic logic [DAC_W-1:0] step_dac(logic [DAC_W-1:0] c,
                                                logic up, logic dn);
    if (up && c != '1)      return c + 1'b1;
    else if (dn && c != '0) return c - 1'b1;
    else                    return c;
  endfunction

  wire last_vote = (lsb_num_cnt == 2'(MV_VOTES - 1));

  always_ff @(posedge clk_lf or negedge rst_n) begin
    if (!rst_n) begin
      stage               <= ST_SAR;
      dac_ctrl            <= DAC_W'(1) << (DAC_W - 1);
      sar_idx             <= 3'(DAC_W - 1);
      dcdl_q              <= DCDL_MID;
      dcdl_ib             <= DCDL_MID;
      dcdl_qb             <= DCDL_MID;
      lsb_num_cnt         <= '0;
      dcdl_update_num_cnt <= 1'b0;
      skip                <= 1'b1;
    end else if (!cal_on) begin
      skip <= 1'b1;
    end else if (skip) begin
      skip <= 1'b0;
    end else begin
      unique case (stage)
        ST_SAR: begin
          if (!sar_low) dac_ctrl[sar_idx] <= 1'b0;
          if (sar_idx != 3'd0) begin
            dac_ctrl[sar_idx - 3'd1] <= 1'b1;
            sar_idx                  <= sar_idx - 3'd1;
          end else begin
            stage       <= ST_DAC_MV;
            lsb_num_cnt <= '0;
          end
        end
        ST_DAC_MV: begin
          dac_ctrl <= step_dac(dac_ctrl, vote_up, vote_dn);
          if (last_vote) begin
            stage       <= ST_Q_MV;
            lsb_num_cnt <= '0;
            skip        <= 1'b1;
          end else lsb_num_cnt <= lsb_num_cnt + 2'd1;
        end
        ST_Q_MV: begin
          dcdl_q <= step_dcdl(dcdl_q, vote_up, vote_dn);
          if (last_vote) begin
            stage       <= ST_IB_MV;
            lsb_num_cnt <= '0;
            skip        <= 1'b1;
          end else lsb_num_cnt <= lsb_num_cnt + 2'd1;
        end
        ST_IB_MV: begin
          dcdl_ib <= step_dcdl(dcdl_ib, vote_up, vote_dn);
          if (last_vote) begin
            stage       <= ST_QB_MV;
            lsb_num_cnt <= '0;
            skip        <= 1'b1;
          end else lsb_num_cnt <= lsb_num_cnt + 2'd1;
        end
        ST_QB_MV: begin
          dcdl_qb <= step_dcdl(dcdl_qb, vote_up, vote_dn);
          if (last_vote) begin
            lsb_num_cnt <= '0;
            skip        <= 1'b1;
            if (int'(dcdl_update_num_cnt) == int'(DCDL_ROUNDS) - 1) begin
              stage               <= ST_DAC_MV;
              dcdl_update_num_cnt <= 1'b0;
            end else begin
              stage               <= ST_Q_MV;
              dcdl_update_num_cnt <= dcdl_update_num_cnt + 1'b1;
            end
          end else lsb_num_cnt <= lsb_num_cnt + 2'd1;
        end
        default: stage <= ST_SAR;
      endcase
    end
  end

  always_comb begin
    sel     = 1'b0;
    sel_dqs = PAIR_I_Q;
    unique case (stage)
      ST_IB_MV: begin sel = 1'b1; sel_dqs = PAIR_Q_IB;  end
      ST_QB_MV: begin sel = 1'b1; sel_dqs = PAIR_IB_QB; end
      ST_Q_MV:  begin sel = 1'b1; sel_dqs = PAIR_I_Q;   end
      default:  ;
    endcase
  end
endmodule
