// rna_pkg: types and constants shared by the RNA trigger modules.
//
// The trigger turns three detector hit-maps (240 SciFi columns, 18 left and
// 18 right Vertical Hodoscope slabs) into four 26-bit neural-network
// patterns and combines the four network answers with empty / overflow /
// spread flags into one decision. Everything here runs on one clock whose
// period is the 0.5 ns timing resolution of the Timing-Unit, so every
// programmable delay is a whole number of ticks.
//
// Sizes follow the hardware description (64-input FDR cards, 80-bit C-card
// windows with a 16-column overlap, 4-bit distances and hit counts, 8-bit
// SciFi positions, 5-bit hodoscope positions). The look-up-table word
// layouts, the M-Mode bit order and the on-board-bus register map are this
// design's own choices, since the description does not define them.
package rna_pkg;

  // ---------------- detector geometry ----------------
  localparam int unsigned SCIFI_CH     = 240;  // vertical SciFi columns
  localparam int unsigned FDR_CH       = 64;   // inputs per FDR-CARD
  localparam int unsigned N_CARDS      = 4;    // FDR-CARDs = C-CARDs = NN-CARDs
  localparam int unsigned OVERLAP      = 16;   // columns shared by adjacent C-CARDs
  localparam int unsigned CCARD_W      = FDR_CH + OVERLAP; // 80-bit C-CARD hit-map
  localparam int unsigned VH_CH        = 18;   // slabs per Vertical Hodoscope arm
  localparam int unsigned SPOS_W       = 8;    // SciFi position width
  localparam int unsigned VPOS_W       = 5;    // VL / VR position width
  localparam int unsigned NN_PAT_W     = 2*SPOS_W + 2*VPOS_W; // 26

  // ---------------- look-up-table word layouts ----------------
  // Pattern-Unit LUT word (VL-LUT and VR-LUT, 16 bits)
  typedef struct packed {
    logic [1:0]        spare;
    logic              p2_ava;  // second position valid
    logic              p1_ava;  // first position valid
    logic              ovr;     // more than two hits
    logic              empty;   // no hit
    logic [VPOS_W-1:0] p2;      // higher position (0 when not valid)
    logic [VPOS_W-1:0] p1;      // lower position  (0 when not valid)
  } vlut_word_t;
  localparam logic [15:0] VLUT_OVR_WORD = 16'h0800; // only the ovr bit set

  // C-CARDs-Unit MIND-LUT word (4 bits)
  typedef struct packed {
    logic       ll_single_hit; // every distance is 0 or 15, at least one 0
    logic       min_dist15;    // smallest distance is 15
    logic [1:0] sel;           // index of the C-CARD to select
  } mind_word_t;

  // C-CARDs-Unit HITS-LUT word (4 bits)
  typedef struct packed {
    logic spare;
    logic scifi_ovr;   // total hits > 5
    logic single_hit;  // total hits == 1
    logic scifi_empty; // total hits == 0
  } hits_word_t;
  localparam logic [3:0] HLUT_OVR_WORD = 4'b0100;

  // ---------------- operating modes (M-Mode register) ----------------
  typedef struct packed {
    logic test_du;
    logic test_nn;
    logic test_cu;
    logic test_pu;
    logic test_tu;
    logic test_ovrall;
    logic load_sram;
    logic single_shot;
    logic work;
    logic loaded;
  } mmode_t;  // bit 0 = loaded ... bit 9 = test_du

  // ---------------- 16-bit on-board bus ----------------
  // Address A5..A4 picks the communication chip, A3..A1 its register.
  typedef enum logic [1:0] {CHIP_TU = 2'd0, CHIP_PU = 2'd1,
                            CHIP_DU = 2'd2, CHIP_CU = 2'd3} chip_e;

  typedef struct packed {
    logic [3:0]  cs;     // one-hot chip select, index = chip_e
    logic [2:0]  addr;   // register number (A3..A1)
    logic        wr;     // one-cycle write strobe
    logic [15:0] wdata;
  } obb_req_t;

  // Flags sent from the Pattern-Unit and C-CARDs-Unit to the Decision-Unit.
  typedef struct packed {
    logic vl_empty, vr_empty, scifi_empty;
    logic vl_ovr,   vr_ovr,   scifi_ovr;
    logic vl_1p_ava, vl_2p_ava, vr_1p_ava, vr_2p_ava;
    logic min_dist15, ll_single_hit, single_hit;
  } du_flags_t;

  // Build one NN-PATTERN. Bit 0 of the pattern carries the MSB of SciFi_POS1
  // (the NN-CARD input numbering runs from MSB to LSB), so every field is
  // bit-reversed into place.
  function automatic logic [NN_PAT_W-1:0] nn_pattern(
      input logic [SPOS_W-1:0] pos1, input logic [SPOS_W-1:0] pos2,
      input logic [VPOS_W-1:0] vl,   input logic [VPOS_W-1:0] vr);
    logic [NN_PAT_W-1:0] p;
    for (int i = 0; i < SPOS_W; i++) begin
      p[i]          = pos1[SPOS_W-1-i];
      p[SPOS_W + i] = pos2[SPOS_W-1-i];
    end
    for (int i = 0; i < VPOS_W; i++) begin
      p[2*SPOS_W + i]          = vl[VPOS_W-1-i];
      p[2*SPOS_W + VPOS_W + i] = vr[VPOS_W-1-i];
    end
    return p;
  endfunction

endpackage
