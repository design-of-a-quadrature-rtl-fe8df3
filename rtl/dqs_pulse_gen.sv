`timescale 1ps/1fs
// dqs_pulse_gen: DQS pulse generator of the QEC pulse generator.
//
// Two 3-input multiplexers pick a pair of neighbouring quadrature DQS phases
// (I-Q, Q-IB or IB-QB, chosen by sel_dqs). The output is high while the
// earlier phase is already high and the later one is still low, so each DQS
// rising edge pair gives one pulse whose width equals the phase difference of
// the two strobes. That is what the pulse-width detector compares with a
// quarter of the clock period. The pair selection and the pulse are the
// design's; the analog delay matching (a transmission gate in the earlier
// phase's path balancing the inverter in the later one) has no logic
// function and is not modelled. The enable and the output held low for the
// unused sel_dqs code 3 are this design's choices.
//
// Interface: combinational; i, q, ib, qb are the corrected strobes of the main
// path, sel_dqs the pair (qec_pkg::pair_sel_e), en gates the output.
module dqs_pulse_gen
  import qec_pkg::*;
(
  input  logic      i,
  input  logic      q,
  input  logic      ib,
  input  logic      qb,
  input  logic [1:0] sel_dqs,
  input  logic      en,
  output logic      dqs_pulse
);
  logic early, late;

  always_comb begin
    unique case (pair_sel_e'(sel_dqs))
      PAIR_I_Q:   begin early = i;  late = q;  end
      PAIR_Q_IB:  begin early = q;  late = ib; end
      PAIR_IB_QB: begin early = ib; late = qb; end
      default:    begin early = 1'b0; late = 1'b1; end
    endcase
  end

  assign dqs_pulse = en & early & ~late;
endmodule
