`timescale 1ps/1fs
// glitch_free_mux: glitch-free selection between clk_pulse and dqs_pulse.
//
// A plain MUX switched while a pulse is high would cut that pulse or splice
// two pulses together, and the divider and pulse-width detector behind it
// would see a false pulse. Here each input has its own enable flip-flop,
// clocked on the falling edge of that input. The clk_pulse enable is cleared
// at a falling edge of clk_pulse once sel asks for DQS mode; the dqs_pulse
// enable is set at a later falling edge of dqs_pulse, and only while the
// other enable is clear (and the reverse for the switch back). The output is
// the OR of the two enabled inputs. So a switch only happens between pulses
// and the two paths are never enabled together. This structure, the select
// retimed to the negative edge of each pulse, follows the design; the
// asynchronous reset (both enables cleared) is this design's choice.
//
// Interface: sel = 1 selects dqs_pulse. sel_sync is the dqs enable, i.e. the
// mode of the pulses that actually reach the output; the pulse-width detector
// uses it to choose its capacitor configuration.
module glitch_free_mux (
  input  logic rst_n,
  input  logic sel,
  input  logic clk_pulse,
  input  logic dqs_pulse,
  output logic pulse,
  output logic sel_sync
);
  logic en_dqs, en_clk;

  always_ff @(negedge dqs_pulse or negedge rst_n) begin
    if (!rst_n) en_dqs <= 1'b0;
    else        en_dqs <= sel & ~en_clk;
  end

  always_ff @(negedge clk_pulse or negedge rst_n) begin
    if (!rst_n) en_clk <= 1'b0;
    else        en_clk <= ~sel & ~en_dqs;
  end

  assign pulse    = (en_dqs & dqs_pulse) | (en_clk & clk_pulse);
  assign sel_sync = en_dqs;
endmodule
