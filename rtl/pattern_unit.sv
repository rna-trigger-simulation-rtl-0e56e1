// pattern_unit: Pattern-Unit of the M-CARD. Converts the two Vertical
// Hodoscope hit-maps (VL1..18, VR1..18) into hit positions and flags.
//
// On the V_CLK strobe both 18-bit hit-maps are registered (the detector
// signals are valid for only about 20 ns). Each registered map addresses its
// own 256k x 16 SRAM look-up table (VL-LUT, VR-LUT), whose word holds the
// lower position 1P, the higher position 2P, EMPTY, OVR, 1P_AVA and 2P_AVA
// (layout vlut_word_t). The positions go to the NN-CARDs, the flags to the
// Decision-Unit. The tables are loaded over the on-board bus; a fill command
// first writes the overflow word into every address of both tables, after
// which only the few patterns with at most two hits need writing.
//
// Modes (from the M-Mode register), with the control signals of the board:
//   WORK        input registers -> LUT -> NN outputs and flags
//   TEST_OVRALL test hit-patterns from registers -> LUT -> outputs and flags
//   TEST_NN     test positions from registers straight to the NN outputs
//   TEST_PU     test addresses from registers -> LUT -> read back on the bus
//   LOAD_SRAM   address and data from registers written into the LUTs
// Outside these modes the NN outputs are zero (drivers off, inputs of the
// NN-CARDs pulled low) and all flags are zero.
//
// Registers (this design's map): 0 LUT address bits 15..0; 1 bits 1..0 =
// address bits 17..16, bit 2 = table (0 VL, 1 VR); 2 LUT data (write stores
// it in LOAD_SRAM, read returns the addressed word); 3 write = start fill,
// read bit 0 = fill running; 4 VL test pattern bits 15..0 (in TEST_NN:
// {VL_2P, VL_1P}); 5 test pattern high bits {VR[17:16], VL[17:16]};
// 6 VR test pattern bits 15..0 (in TEST_NN: {VR_2P, VR_1P}).
//
// The table sizes, word contents, register on V_CLK, the modes and the
// overflow pre-fill follow the description; the register map, the word bit
// order and the hardware fill sequencer are this design's choices.
module pattern_unit
  import rna_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mmode_t            mode,
  input  logic [VH_CH-1:0]  vl,
  input  logic [VH_CH-1:0]  vr,
  input  logic              v_clk,
  input  obb_req_t          obb,
  output logic [15:0]       obb_rdata,
  output logic [VPOS_W-1:0] vl_1p, vl_2p, vr_1p, vr_2p,
  output logic              vl_empty, vr_empty, vl_ovr, vr_ovr,
  output logic              vl_1p_ava, vl_2p_ava, vr_1p_ava, vr_2p_ava,
  output logic              fill_busy
);

  localparam int unsigned AW = VH_CH;  // LUT address = one bit per slab

  logic [AW-1:0] vl_q, vr_q;
  logic [AW-1:0] vl_addr, vr_addr;
  logic [AW-1:0] t_vl, t_vr;
  logic [AW-1:0] lut_a;     // test / load address
  logic          lut_sel;   // 0 VL, 1 VR
  logic [15:0]   lut_wd;
  logic          wr_data_p;
  logic [AW-1:0] fill_a;
  logic          vl_we, vr_we;
  logic [15:0]   vl_rd, vr_rd;
  logic          work_path;
  vlut_word_t    vlw, vrw;

  wire wr_pu = obb.wr && obb.cs[CHIP_PU];

  // detector input registers, clocked by V_CLK
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vl_q <= '0;
      vr_q <= '0;
    end else if (v_clk) begin
      vl_q <= vl;
      vr_q <= vr;
    end
  end

  // communication registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lut_a     <= '0;
      lut_sel   <= 1'b0;
      lut_wd    <= '0;
      wr_data_p <= 1'b0;
      t_vl      <= '0;
      t_vr      <= '0;
      fill_busy <= 1'b0;
      fill_a    <= '0;
    end else begin
      wr_data_p <= 1'b0;
      if (wr_pu) begin
        case (obb.addr)
          3'd0: lut_a[15:0] <= obb.wdata;
          3'd1: begin
            lut_a[AW-1:16] <= obb.wdata[AW-17:0];
            lut_sel        <= obb.wdata[2];
          end
          3'd2: begin
            lut_wd    <= obb.wdata;
            wr_data_p <= 1'b1;
          end
          3'd3: if (mode.load_sram) begin
            fill_busy <= 1'b1;
            fill_a    <= '0;
          end
          3'd4: t_vl[15:0] <= obb.wdata;
          3'd5: begin
            t_vl[AW-1:16] <= obb.wdata[AW-17:0];
            t_vr[AW-1:16] <= obb.wdata[AW-15:2];
          end
          3'd6: t_vr[15:0] <= obb.wdata;
          default: ;
        endcase
      end
      if (fill_busy) begin
        fill_a <= fill_a + 1'b1;
        if (&fill_a || !mode.load_sram) fill_busy <= 1'b0;
      end
    end
  end

  // LUT address multiplexer
  always_comb begin
    if (mode.load_sram && fill_busy) begin
      vl_addr = fill_a;
      vr_addr = fill_a;
    end else if (mode.load_sram || mode.test_pu) begin
      vl_addr = lut_a;
      vr_addr = lut_a;
    end else if (mode.test_ovrall) begin
      vl_addr = t_vl;
      vr_addr = t_vr;
    end else begin
      vl_addr = vl_q;
      vr_addr = vr_q;
    end
  end

  always_comb begin
    vl_we = 1'b0;
    vr_we = 1'b0;
    if (mode.load_sram) begin
      if (fill_busy) begin
        vl_we = 1'b1;
        vr_we = 1'b1;
      end else if (wr_data_p) begin
        vl_we = !lut_sel;
        vr_we = lut_sel;
      end
    end
  end

  lut_sram #(.AW(AW), .DW(16)) u_vl_lut (
    .clk, .addr(vl_addr), .we(vl_we),
    .wdata(fill_busy ? VLUT_OVR_WORD : lut_wd), .rdata(vl_rd));
  lut_sram #(.AW(AW), .DW(16)) u_vr_lut (
    .clk, .addr(vr_addr), .we(vr_we),
    .wdata(fill_busy ? VLUT_OVR_WORD : lut_wd), .rdata(vr_rd));

  assign vlw = vlut_word_t'(vl_rd);
  assign vrw = vlut_word_t'(vr_rd);

  assign work_path = !mode.load_sram && !mode.test_pu && !mode.test_nn &&
                     (mode.test_ovrall || mode.work);

  always_comb begin
    {vl_1p, vl_2p, vr_1p, vr_2p} = '0;
    {vl_empty, vr_empty, vl_ovr, vr_ovr} = '0;
    {vl_1p_ava, vl_2p_ava, vr_1p_ava, vr_2p_ava} = '0;
    if (!mode.load_sram && !mode.test_pu && mode.test_nn) begin
      vl_1p = t_vl[4:0];
      vl_2p = t_vl[9:5];
      vr_1p = t_vr[4:0];
      vr_2p = t_vr[9:5];
    end else if (work_path) begin
      vl_1p     = vlw.p1;
      vl_2p     = vlw.p2;
      vr_1p     = vrw.p1;
      vr_2p     = vrw.p2;
      vl_empty  = vlw.empty;
      vr_empty  = vrw.empty;
      vl_ovr    = vlw.ovr;
      vr_ovr    = vrw.ovr;
      vl_1p_ava = vlw.p1_ava;
      vl_2p_ava = vlw.p2_ava;
      vr_1p_ava = vrw.p1_ava;
      vr_2p_ava = vrw.p2_ava;
    end
  end

  always_comb begin
    case (obb.addr)
      3'd0:    obb_rdata = lut_a[15:0];
      3'd1:    obb_rdata = {13'd0, lut_sel, 2'(lut_a[AW-1:16])};
      3'd2:    obb_rdata = lut_sel ? vr_rd : vl_rd;
      3'd3:    obb_rdata = {15'd0, fill_busy};
      3'd4:    obb_rdata = t_vl[15:0];
      3'd5:    obb_rdata = {12'd0, 2'(t_vr[AW-1:16]), 2'(t_vl[AW-1:16])};
      3'd6:    obb_rdata = t_vr[15:0];
      default: obb_rdata = '0;
    endcase
  end

endmodule
