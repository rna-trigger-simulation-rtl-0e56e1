// ccards_unit: C-CARDs-Unit of the M-CARD. Chooses which C-CARD drives the
// SciFi positions and derives the SciFi flags for the Decision-Unit.
//
// The four 4-bit minimum distances address the 64k x 4 MIND-LUT, whose word
// (mind_word_t) gives the index of the C-CARD to select, MIN_DIST15 (the
// smallest distance is 15) and LL_SINGLE_HIT ("looks like a single hit":
// every distance is 0 or 15 and at least one is 0). The selection rule the
// table is loaded with: smallest distance among 1..14 first, then 0 (single
// hit), then 15, ties to the lowest card. The index passes a 2-to-4 decoder,
// the multiplexer, so exactly one SEL line can be high and the position bus
// never has two drivers. The four 4-bit hit counts address the 64k x 4
// HITS-LUT, whose word (hits_word_t) gives SciFi_EMPTY (sum 0), SINGLE_HIT
// (sum 1) and SciFi_OVR (sum > 5). The C-CARD values are not registered:
// they are stable until the next event.
//
// Modes: WORK (C-CARD values -> LUTs -> multiplexer and flags), TEST_OVRALL
// (test values from registers instead of the C-CARDs), TEST_CU (LUT read
// back through register 2, multiplexer off), LOAD_SRAM (register writes into
// the LUTs, including a fill of the HITS-LUT with the overflow word). Outside
// WORK and TEST_OVRALL no SEL line is driven and the flags are zero.
//
// Registers (this design's map): 0 LUT address; 1 bit 0 = table (0 MIND,
// 1 HITS); 2 LUT data (write in LOAD_SRAM / read); 3 write = start HITS-LUT
// fill, read bit 0 = fill running; 4 test distances {D4,D3,D2,D1};
// 5 test hit counts {H4,H3,H2,H1}.
//
// Table sizes, their meaning, the multiplexer and the modes follow the
// description; word layouts, register map and fill sequencer are this
// design's choices.
module ccards_unit
  import rna_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mmode_t      mode,
  input  logic [15:0] min_dist,  // {MIN_DIST4, .., MIN_DIST1}
  input  logic [15:0] hits,      // {HITS4, .., HITS1}
  input  obb_req_t    obb,
  output logic [15:0] obb_rdata,
  output logic [3:0]  sel,       // SEL4..SEL1
  output logic        min_dist15,
  output logic        ll_single_hit,
  output logic        scifi_empty,
  output logic        single_hit,
  output logic        scifi_ovr,
  output logic        fill_busy
);

  logic [15:0] lut_a, lut_wd, t_dist, t_hits, fill_a;
  logic        lut_sel, wr_data_p;
  logic [15:0] mind_addr, hits_addr;
  logic        mind_we, hits_we;
  logic [3:0]  mind_rd, hits_rd;
  mind_word_t  mw;
  hits_word_t  hw;
  logic        active;

  wire wr_cu = obb.wr && obb.cs[CHIP_CU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lut_a     <= '0;
      lut_sel   <= 1'b0;
      lut_wd    <= '0;
      wr_data_p <= 1'b0;
      t_dist    <= '0;
      t_hits    <= '0;
      fill_busy <= 1'b0;
      fill_a    <= '0;
    end else begin
      wr_data_p <= 1'b0;
      if (wr_cu) begin
        case (obb.addr)
          3'd0: lut_a   <= obb.wdata;
          3'd1: lut_sel <= obb.wdata[0];
          3'd2: begin
            lut_wd    <= obb.wdata;
            wr_data_p <= 1'b1;
          end
          3'd3: if (mode.load_sram) begin
            fill_busy <= 1'b1;
            fill_a    <= '0;
          end
          3'd4: t_dist <= obb.wdata;
          3'd5: t_hits <= obb.wdata;
          default: ;
        endcase
      end
      if (fill_busy) begin
        fill_a <= fill_a + 1'b1;
        if (&fill_a || !mode.load_sram) fill_busy <= 1'b0;
      end
    end
  end

  always_comb begin
    if (mode.load_sram || mode.test_cu) begin
      mind_addr = lut_a;
      hits_addr = (mode.load_sram && fill_busy) ? fill_a : lut_a;
    end else if (mode.test_ovrall) begin
      mind_addr = t_dist;
      hits_addr = t_hits;
    end else begin
      mind_addr = min_dist;
      hits_addr = hits;
    end
  end

  assign mind_we = mode.load_sram && !fill_busy && wr_data_p && !lut_sel;
  assign hits_we = mode.load_sram && (fill_busy || (wr_data_p && lut_sel));

  lut_sram #(.AW(16), .DW(4)) u_mind_lut (
    .clk, .addr(mind_addr), .we(mind_we), .wdata(lut_wd[3:0]), .rdata(mind_rd));
  lut_sram #(.AW(16), .DW(4)) u_hits_lut (
    .clk, .addr(hits_addr), .we(hits_we),
    .wdata(fill_busy ? HLUT_OVR_WORD : lut_wd[3:0]), .rdata(hits_rd));

  assign mw = mind_word_t'(mind_rd);
  assign hw = hits_word_t'(hits_rd);

  assign active = !mode.load_sram && !mode.test_cu && (mode.work || mode.test_ovrall);

  // multiplexer: decode the index so that one SEL line at most is high
  always_comb begin
    sel = '0;
    if (active) sel[mw.sel] = 1'b1;
  end

  assign min_dist15    = active && mw.min_dist15;
  assign ll_single_hit = active && mw.ll_single_hit;
  assign scifi_empty   = active && hw.scifi_empty;
  assign single_hit    = active && hw.single_hit;
  assign scifi_ovr     = active && hw.scifi_ovr;

  always_comb begin
    case (obb.addr)
      3'd0:    obb_rdata = lut_a;
      3'd1:    obb_rdata = {15'd0, lut_sel};
      3'd2:    obb_rdata = {12'd0, lut_sel ? hits_rd : mind_rd};
      3'd3:    obb_rdata = {15'd0, fill_busy};
      3'd4:    obb_rdata = t_dist;
      3'd5:    obb_rdata = t_hits;
      default: obb_rdata = '0;
    endcase
  end

endmodule
