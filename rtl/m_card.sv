// m_card: Master card of the RNA trigger. Holds the five units of the card
// and wires them together:
//   Timing-Unit    sequence START -> V_CLK, SciFi_GATE, NN_CLK, STRB, BUSY
//   Pattern-Unit   VL / VR hit-maps -> four 5-bit positions and flags
//   C-CARDs-Unit   four distances and hit counts -> SEL1..4 and SciFi flags
//   Decision-Unit  NN decisions + flags -> RNA_DEC, STRB
//   VMEbus INTERFACE  A16/D16 slave, M-Mode/M-Status, safety and reset logic
// The units talk to the VMEbus through the 16-bit on-board bus (obb_req_t).
// NN_CLK is buffered separately for each of the four NN-CARDs. The
// front-panel LEDs are brought out as signals.
//
// Timing: all units run on one clock whose period is the 0.5 ns resolution
// of the programmable delays (see timing_unit). The C-CARD values and the NN
// decisions are used without registers, as on the card: they are stable
// from the end of the SciFi gate, respectively NN_CLK, until the next event.
//
// The partition into units and the signals between them follow the
// description; bringing the LEDs out as plain outputs is this design's
// choice.
module m_card
  import rna_pkg::*;
#(
  parameter int unsigned WDOG_TICKS = 20000000  // 10 ms at 0.5 ns
) (
  input  logic              clk,
  input  logic              vcc_ok,
  input  logic              sys_reset_n,
  input  logic [3:0]        card_no,
  // VMEbus
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_lword_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [15:1]       vme_a,
  input  logic [15:0]       vme_d_in,
  output logic [15:0]       vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output logic              vme_berr_n,
  output logic              vme_sysfail_n,
  input  logic [3:0]        nn_loaded,
  // trigger control
  input  logic              start,
  input  logic              veto,
  output logic              busy,
  output logic              rna_dec,
  output logic              strb,
  // board settings
  input  logic [4:0]        nn_delay_sel,
  input  logic [7:0]        strb_delay_sel,
  // detectors
  input  logic [VH_CH-1:0]  vl,
  input  logic [VH_CH-1:0]  vr,
  // C-CARDs
  input  logic [15:0]       cc_min_dist,  // {MIN_DIST4..1}
  input  logic [15:0]       cc_hits,      // {HITS4..1}
  output logic [3:0]        cc_sel,       // SEL4..1
  output logic              scifi_gate,
  // NN-CARDs
  output logic [VPOS_W-1:0] vl_1p, vl_2p, vr_1p, vr_2p,
  output logic [3:0]        nn_clk,
  input  logic [3:0]        nn_dec,
  // front-panel LEDs
  output logic              led_loaded, led_5v_ok, led_test, led_load,
  output logic              led_work, led_ss, led_start, led_busy,
  output logic              led_dtack, led_berr
);

  mmode_t      mode;
  obb_req_t    obb;
  logic        rst_n;
  logic [15:0] chip_rdata [4];
  logic        ready, v_clk, nn_clk_i, strb_tu;
  logic        pu_fill, cu_fill;
  du_flags_t   flags;
  logic        vl_empty, vr_empty, vl_ovr, vr_ovr;
  logic        vl_1p_ava, vl_2p_ava, vr_1p_ava, vr_2p_ava;
  logic        min_dist15, ll_single_hit, scifi_empty, single_hit, scifi_ovr;

  vme_interface u_vme (
    .clk, .vcc_ok, .sys_reset_n, .card_no,
    .as_n(vme_as_n), .ds_n(vme_ds_n), .lword_n(vme_lword_n),
    .write_n(vme_write_n), .am(vme_am), .a(vme_a), .d_in(vme_d_in),
    .d_out(vme_d_out), .d_oe(vme_d_oe), .dtack_n(vme_dtack_n),
    .berr_n(vme_berr_n), .sysfail_n(vme_sysfail_n),
    .nn_loaded, .busy, .ready, .chip_rdata, .obb, .mode,
    .unit_rst_n(rst_n), .led_test);

  timing_unit #(.WDOG_TICKS(WDOG_TICKS)) u_tu (
    .clk, .rst_n, .mode, .start, .veto, .nn_delay_sel, .strb_delay_sel,
    .obb, .obb_rdata(chip_rdata[CHIP_TU]), .busy, .ready, .v_clk,
    .scifi_gate, .nn_clk(nn_clk_i), .strb(strb_tu));

  pattern_unit u_pu (
    .clk, .rst_n, .mode, .vl, .vr, .v_clk, .obb,
    .obb_rdata(chip_rdata[CHIP_PU]),
    .vl_1p, .vl_2p, .vr_1p, .vr_2p,
    .vl_empty, .vr_empty, .vl_ovr, .vr_ovr,
    .vl_1p_ava, .vl_2p_ava, .vr_1p_ava, .vr_2p_ava, .fill_busy(pu_fill));

  ccards_unit u_cu (
    .clk, .rst_n, .mode, .min_dist(cc_min_dist), .hits(cc_hits), .obb,
    .obb_rdata(chip_rdata[CHIP_CU]), .sel(cc_sel),
    .min_dist15, .ll_single_hit, .scifi_empty, .single_hit, .scifi_ovr,
    .fill_busy(cu_fill));

  always_comb begin
    flags.vl_empty      = vl_empty;
    flags.vr_empty      = vr_empty;
    flags.scifi_empty   = scifi_empty;
    flags.vl_ovr        = vl_ovr;
    flags.vr_ovr        = vr_ovr;
    flags.scifi_ovr     = scifi_ovr;
    flags.vl_1p_ava     = vl_1p_ava;
    flags.vl_2p_ava     = vl_2p_ava;
    flags.vr_1p_ava     = vr_1p_ava;
    flags.vr_2p_ava     = vr_2p_ava;
    flags.min_dist15    = min_dist15;
    flags.ll_single_hit = ll_single_hit;
    flags.single_hit    = single_hit;
  end

  decision_unit u_du (
    .clk, .rst_n, .mode, .nn_dec, .flags, .strb_in(strb_tu), .obb,
    .obb_rdata(chip_rdata[CHIP_DU]), .rna_dec, .strb);

  assign nn_clk = {4{nn_clk_i}};

  assign led_loaded = mode.loaded;
  assign led_5v_ok  = vcc_ok && rst_n;
  assign led_load   = mode.load_sram || pu_fill || cu_fill;
  assign led_work   = mode.work;
  assign led_ss     = mode.single_shot;
  assign led_start  = start && !veto;
  assign led_busy   = busy;
  assign led_dtack  = !vme_dtack_n;
  assign led_berr   = !vme_berr_n;

endmodule
