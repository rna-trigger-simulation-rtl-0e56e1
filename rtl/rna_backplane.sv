// rna_backplane: the dedicated RNA backplane, the wiring between the cards.
//
//  * Distributes the registered FDR-CARD outputs into the four 80-column
//    C-CARD windows: C-CARD k gets FDR-CARD k's 64 columns plus the lowest
//    16 columns of FDR-CARD k+1 (from that card's duplicated outputs);
//    C-CARD #4 has no right neighbour and its upper 16 inputs are low.
//  * Models the three-state SciFi position bus: the C-CARD whose output
//    enable is high drives SciFi_POS1/2; with no driver the bus reads 0.
//  * Assembles the four 26-bit NN-PATTERNs. Every NN-CARD gets both SciFi
//    positions; the hodoscope positions are paired as NN-CARD 1 VL_1P/VR_1P,
//    2 VL_1P/VR_2P, 3 VL_2P/VR_1P, 4 VL_2P/VR_2P, and every field is placed
//    MSB first (pattern bit 0 = MSB of SciFi_POS1), see rna_pkg::nn_pattern.
//
// The window distribution, the pairing and the bit order follow the
// description. Modelling the bus as an AND-OR of enabled drivers (the
// M-CARD guarantees a single SEL line) and the undriven value 0 are this
// design's choices. Purely combinational.
module rna_backplane
  import rna_pkg::*;
(
  input  logic [FDR_CH-1:0]   fdr_hits [N_CARDS],
  input  logic [15:0]         fdr_dup  [N_CARDS],
  output logic [CCARD_W-1:0]  cc_window [N_CARDS],
  input  logic [SPOS_W-1:0]   cc_pos1 [N_CARDS],
  input  logic [SPOS_W-1:0]   cc_pos2 [N_CARDS],
  input  logic [N_CARDS-1:0]  cc_pos_oe,
  output logic [SPOS_W-1:0]   scifi_pos1,
  output logic [SPOS_W-1:0]   scifi_pos2,
  input  logic [VPOS_W-1:0]   vl_1p, vl_2p, vr_1p, vr_2p,
  output logic [NN_PAT_W-1:0] nn_pat [N_CARDS]
);

  always_comb begin
    for (int k = 0; k < N_CARDS; k++) begin
      if (k < N_CARDS-1) cc_window[k] = {fdr_dup[k+1], fdr_hits[k]};
      else               cc_window[k] = {16'd0, fdr_hits[k]};
    end
  end

  always_comb begin
    scifi_pos1 = '0;
    scifi_pos2 = '0;
    for (int k = 0; k < N_CARDS; k++) begin
      if (cc_pos_oe[k]) begin
        scifi_pos1 = scifi_pos1 | cc_pos1[k];
        scifi_pos2 = scifi_pos2 | cc_pos2[k];
      end
    end
  end

  assign nn_pat[0] = nn_pattern(scifi_pos1, scifi_pos2, vl_1p, vr_1p);
  assign nn_pat[1] = nn_pattern(scifi_pos1, scifi_pos2, vl_1p, vr_2p);
  assign nn_pat[2] = nn_pattern(scifi_pos1, scifi_pos2, vl_2p, vr_1p);
  assign nn_pat[3] = nn_pattern(scifi_pos1, scifi_pos2, vl_2p, vr_2p);

endmodule
