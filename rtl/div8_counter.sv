`timescale 1ps/1fs
// div8_counter: DIV8 and 3-bit counter between the pulse-width detector and
// the digital loop filter.
//
// The loop filter runs on clk_lf, the measurement pulse divided by eight, to
// save power. A 3-bit count of the pulses (cnt) gives clk_lf = cnt[2]. On the
// falling edge of the pulse that brings cnt to 3, rst_d goes high for one
// pulse; it clears the 3-bit counter of the detector output d. That counter
// advances on each rising pulse edge at which d is high (its clock is d AND
// pulse), so it counts the decisions of the seven pulses in a window of eight
// (the decision arriving while rst_d is high is dropped). dout[2:0] is the
// counter copied on every falling pulse edge, away from the rising clk_lf
// edge that the loop filter samples it on. At that clk_lf edge dout holds the
// full count of the window just ended; one falling edge later it shows the
// cleared count.
//
// DIV8 from the pulse, the 3-bit counter of d clocked by d and pulse, rst_d
// made by DIV8, dout retimed to the negative pulse edge and the window of
// Fig. 3.15 follow the design. The reset phase chosen (rst_d around the
// rising clk_lf edge), a synchronous binary count in place of a ripple
// counter, and rst_n are this design's choices.
//
// Interface: pulse (measurement pulse), d (detector decision, valid at the
// next rising pulse edge), rst_n; clk_lf, dout[2:0], rst_d.
module div8_counter
  import qec_pkg::*;
(
  input  logic             rst_n,
  input  logic             pulse,
  input  logic             d,
  output logic             clk_lf,
  output logic [CNT_W-1:0] dout,
  output logic             rst_d
);
  logic [2:0]       cnt;
  logic [CNT_W-1:0] d_ff;
  logic             cnt_clk;

  // DIV8
  always_ff @(posedge pulse or negedge rst_n) begin
    if (!rst_n) cnt <= 3'd0;
    else        cnt <= cnt + 3'd1;
  end
  assign clk_lf = cnt[2];

  always_ff @(negedge pulse or negedge rst_n) begin
    if (!rst_n) rst_d <= 1'b1;
    else        rst_d <= (cnt == 3'd3);
  end

  // 3-bit counter of d
  assign cnt_clk = d & pulse;

  always_ff @(posedge cnt_clk or posedge rst_d) begin
    if (rst_d) d_ff <= '0;
    else       d_ff <= d_ff + 1'b1;
  end

  always_ff @(negedge pulse or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= d_ff;
  end
endmodule
