// rna_trigger: the complete RNA trigger electronics (the Preformat &
// Decision Electronics): four FDR-CARDs, four C-CARDs, the M-CARD and the RNA
// backplane. The four NN-CARDs are external: the trigger sends them the four
// 26-bit NN-PATTERNs and NN_CLK and receives their four decisions.
//
// Data flow of one event: START begins the sequence in the M-CARD's
// Timing-Unit. SciFi_GATE makes the FDR-CARDs register their delayed SciFi
// columns; the C-CARDs find the closest hit pair and count hits in their
// windows; the M-CARD selects the C-CARD with the smallest distance, which
// drives the two SciFi positions. V_CLK registers the hodoscope hit-maps and
// the Pattern-Unit looks up their positions. NN_CLK tells the NN-CARDs to
// take the patterns; STRB_DELAY later the Decision-Unit samples their
// answers with the flags and raises STRB with RNA_DEC.
//
// SciFi columns 1..240 are scifi[0]..scifi[239]; FDR-CARD #4 uses 48 of its
// 64 inputs and the rest are held low. All cards share one clock whose
// period is the 0.5 ns timing resolution; the programmable delays and the
// 5 ns FDR delay steps are counted in it. The card structure, the signal
// names and the data flow follow the description; the single clock is this
// design's model of the asynchronous ECL timing chain.
module rna_trigger
  import rna_pkg::*;
#(
  parameter int unsigned WDOG_TICKS = 20000000  // 10 ms at 0.5 ns
) (
  input  logic                clk,
  input  logic                vcc_ok,
  input  logic                sys_reset_n,
  // detectors
  input  logic [SCIFI_CH-1:0] scifi,
  input  logic [VH_CH-1:0]    vl,
  input  logic [VH_CH-1:0]    vr,
  output logic [SCIFI_CH-1:0] scifi_fanout,
  // trigger control
  input  logic                t0_start,
  input  logic                veto,
  output logic                busy,
  output logic                rna_dec,
  output logic                strb,
  // NN-CARDs
  output logic [NN_PAT_W-1:0] nn_pat [N_CARDS],
  output logic [N_CARDS-1:0]  nn_clk,
  input  logic [N_CARDS-1:0]  nn_dec,
  input  logic [N_CARDS-1:0]  nn_loaded,
  // board settings
  input  logic [3:0]          m_card_no,
  input  logic [3:0]          fdr_bcd_tens  [N_CARDS],
  input  logic [3:0]          fdr_bcd_units [N_CARDS],
  input  logic [4:0]          nn_delay_sel,
  input  logic [7:0]          strb_delay_sel,
  // VMEbus
  input  logic                vme_as_n,
  input  logic [1:0]          vme_ds_n,
  input  logic                vme_lword_n,
  input  logic                vme_write_n,
  input  logic [5:0]          vme_am,
  input  logic [15:1]         vme_a,
  input  logic [15:0]         vme_d_in,
  output logic [15:0]         vme_d_out,
  output logic                vme_d_oe,
  output logic                vme_dtack_n,
  output logic                vme_berr_n,
  output logic                vme_sysfail_n,
  // observation of internal signals that are front-panel outputs
  output logic                scifi_gate,
  output logic [N_CARDS-1:0]  cc_sel,
  output logic [9:0]          leds  // {berr,dtack,busy,start,ss,work,load,test,5v_ok,loaded}
);

  logic                rst_n;
  logic [FDR_CH-1:0]   fdr_in   [N_CARDS];
  logic [FDR_CH-1:0]   fdr_fo   [N_CARDS];
  logic [FDR_CH-1:0]   fdr_hits [N_CARDS];
  logic [15:0]         fdr_dup  [N_CARDS];
  logic [CCARD_W-1:0]  cc_window [N_CARDS];
  logic [SPOS_W-1:0]   cc_pos1 [N_CARDS];
  logic [SPOS_W-1:0]   cc_pos2 [N_CARDS];
  logic [N_CARDS-1:0]  cc_pos_oe;
  logic [15:0]         cc_min_dist, cc_hits;
  logic [SPOS_W-1:0]   scifi_pos1, scifi_pos2;
  logic [VPOS_W-1:0]   vl_1p, vl_2p, vr_1p, vr_2p;

  // the FDR/C-CARD logic is cleared by the crate supply and VMEbus reset
  assign rst_n = vcc_ok && sys_reset_n;

  always_comb begin
    for (int k = 0; k < N_CARDS; k++) begin
      for (int i = 0; i < FDR_CH; i++) begin
        fdr_in[k][i] = (k*FDR_CH + i < SCIFI_CH) ? scifi[k*FDR_CH + i] : 1'b0;
        if (k*FDR_CH + i < SCIFI_CH) scifi_fanout[k*FDR_CH + i] = fdr_fo[k][i];
      end
    end
  end

  for (genvar k = 0; k < N_CARDS; k++) begin : g_card
    fdr_card u_fdr (
      .clk, .rst_n, .scifi_in(fdr_in[k]), .scifi_gate,
      .bcd_tens(fdr_bcd_tens[k]), .bcd_units(fdr_bcd_units[k]),
      .scifi_fanout(fdr_fo[k]), .hits_q(fdr_hits[k]), .hits_dup_q(fdr_dup[k]));

    c_card u_cc (
      .hitmap(cc_window[k]), .card_idx(2'(k)), .sel(cc_sel[k]),
      .min_dist(cc_min_dist[4*k +: 4]), .hits(cc_hits[4*k +: 4]),
      .pos1(cc_pos1[k]), .pos2(cc_pos2[k]), .pos_oe(cc_pos_oe[k]));
  end

  rna_backplane u_bp (
    .fdr_hits, .fdr_dup, .cc_window, .cc_pos1, .cc_pos2, .cc_pos_oe,
    .scifi_pos1, .scifi_pos2, .vl_1p, .vl_2p, .vr_1p, .vr_2p, .nn_pat);

  m_card #(.WDOG_TICKS(WDOG_TICKS)) u_m (
    .clk, .vcc_ok, .sys_reset_n, .card_no(m_card_no),
    .vme_as_n, .vme_ds_n, .vme_lword_n, .vme_write_n, .vme_am, .vme_a,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n, .vme_berr_n,
    .vme_sysfail_n, .nn_loaded,
    .start(t0_start), .veto, .busy, .rna_dec, .strb,
    .nn_delay_sel, .strb_delay_sel, .vl, .vr,
    .cc_min_dist, .cc_hits, .cc_sel, .scifi_gate,
    .vl_1p, .vl_2p, .vr_1p, .vr_2p, .nn_clk, .nn_dec,
    .led_loaded(leds[0]), .led_5v_ok(leds[1]), .led_test(leds[2]),
    .led_load(leds[3]), .led_work(leds[4]), .led_ss(leds[5]),
    .led_start(leds[6]), .led_busy(leds[7]), .led_dtack(leds[8]),
    .led_berr(leds[9]));

endmodule
