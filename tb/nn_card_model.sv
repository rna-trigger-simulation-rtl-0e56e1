// nn_card_model: behavioural stand-in for one NN-CARD, for simulation only.
// The real card is a trained neural network whose weights are not part of
// this design. This model takes the 26-bit NN-PATTERN on the rising edge of
// NN_CLK and answers, DEC_DELAY later, with a fixed rule that favours a close
// pion pair: SciFi positions at most 8 columns apart and hodoscope slabs at
// most 6 apart (both hodoscope positions non-zero). The answer is held until
// the next NN_CLK.
module nn_card_model #(
  parameter int DEC_DELAY = 10  // time units after NN_CLK
) (
  input  logic [25:0] nn_pat,
  input  logic        nn_clk,
  output logic        nn_dec
);
  import tb_rna_ref_pkg::*;

  initial nn_dec = 1'b0;

  always @(posedge nn_clk) begin
    logic d;
    d = nn_rule(nn_pat);
    nn_dec <= #(DEC_DELAY) d;
  end
endmodule
