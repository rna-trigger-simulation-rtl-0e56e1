// decision_unit: Decision-Unit of the M-CARD. Combines the four NN-CARD
// answers with the flags of the Pattern-Unit and the C-CARDs-Unit into the
// RNA decision.
//
//   EMPTY   = VL_EMPTY or VR_EMPTY or SciFi_EMPTY
//   OVR     = VL_OVR or VR_OVR or SciFi_OVR
//   NN_VALk = NN_DECk and the AVAILABLE flags of the positions NN-CARD k got
//             (1: VL_1P,VR_1P  2: VL_1P,VR_2P  3: VL_2P,VR_1P  4: VL_2P,VR_2P)
//   NN_OR   = NN_VAL1 or .. or NN_VAL4
//   DEB15   = MIN_DIST15 and not SciFi_EMPTY
//   SHOM    = LL_SINGLE_HIT and not SINGLE_HIT
// With the OVERFLOW condition enabled (control register bit 0 = 1):
//   RNA_DEC = NN_OR and not (EMPTY or DEB15 or SHOM or OVR)
// With it disabled (the reset value): overflow events are accepted,
//   RNA_DEC = OVR or (NN_OR and not (EMPTY or DEB15 or SHOM)).
// The decision logic is combinational; its result is registered at the
// rising edge of STRB and held until the next event's STRB, so RNA_DEC is
// valid while STRB is high and afterwards.
//
// Modes: WORK (NN-CARD inputs), TEST_OVRALL (NN decisions from register 1),
// TEST_DU (all logic inputs from registers 2/3, the RNA_DEC and STRB pins
// from register 3). Registers (this design's map): 0 control, bit 0 =
// OVERFLOW condition enabled; 1 test NN decisions [3:0]; 2 test inputs
// {ll_single_hit, min_dist15, scifi_ovr, vr_ovr, vl_ovr, scifi_empty,
// vr_empty, vl_empty, ava[vr2,vr1,vl2,vl1], nn_dec[3:0]}; 3 bit 0 test
// single_hit, bit 1 RNA_DEC pin, bit 2 STRB pin; 4 read: logic outputs
// {rna_logic, shom, deb15, nn_or, ovr, empty}.
//
// The equations, the AVAILABLE validation, the two overflow variants and the
// modes follow the description; the register map and the reset value of
// the overflow bit are this design's choices.
module decision_unit
  import rna_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mmode_t      mode,
  input  logic [3:0]  nn_dec,      // NN_DEC4..NN_DEC1
  input  du_flags_t   flags,
  input  logic        strb_in,     // from the Timing-Unit
  input  obb_req_t    obb,
  output logic [15:0] obb_rdata,
  output logic        rna_dec,
  output logic        strb
);

  logic        ovr_cond_en;
  logic [3:0]  t_nn;
  logic [15:0] t_in;
  logic [2:0]  t_out;
  logic        strb_d, dec_q;

  logic [3:0]  nn_i, nn_val;
  du_flags_t   f;
  logic        empty, ovr, nn_or, deb15, shom, dec_logic;

  wire wr_du = obb.wr && obb.cs[CHIP_DU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovr_cond_en <= 1'b0;
      t_nn        <= '0;
      t_in        <= '0;
      t_out       <= '0;
    end else if (wr_du) begin
      case (obb.addr)
        3'd0: ovr_cond_en <= obb.wdata[0];
        3'd1: t_nn        <= obb.wdata[3:0];
        3'd2: t_in        <= obb.wdata;
        3'd3: t_out       <= obb.wdata[2:0];
        default: ;
      endcase
    end
  end

  // input selection
  always_comb begin
    nn_i = nn_dec;
    f    = flags;
    if (mode.test_du) begin
      nn_i            = t_in[3:0];
      f.vl_1p_ava     = t_in[4];
      f.vl_2p_ava     = t_in[5];
      f.vr_1p_ava     = t_in[6];
      f.vr_2p_ava     = t_in[7];
      f.vl_empty      = t_in[8];
      f.vr_empty      = t_in[9];
      f.scifi_empty   = t_in[10];
      f.vl_ovr        = t_in[11];
      f.vr_ovr        = t_in[12];
      f.scifi_ovr     = t_in[13];
      f.min_dist15    = t_in[14];
      f.ll_single_hit = t_in[15];
      f.single_hit    = t_out[0];
    end else if (mode.test_ovrall) begin
      nn_i = t_nn;
    end
  end

  // decision logic
  always_comb begin
    empty     = f.vl_empty || f.vr_empty || f.scifi_empty;
    ovr       = f.vl_ovr || f.vr_ovr || f.scifi_ovr;
    nn_val[0] = nn_i[0] && f.vl_1p_ava && f.vr_1p_ava;
    nn_val[1] = nn_i[1] && f.vl_1p_ava && f.vr_2p_ava;
    nn_val[2] = nn_i[2] && f.vl_2p_ava && f.vr_1p_ava;
    nn_val[3] = nn_i[3] && f.vl_2p_ava && f.vr_2p_ava;
    nn_or     = |nn_val;
    deb15     = f.min_dist15 && !f.scifi_empty;
    shom      = f.ll_single_hit && !f.single_hit;
    if (ovr_cond_en) dec_logic = nn_or && !(empty || deb15 || shom || ovr);
    else             dec_logic = ovr || (nn_or && !(empty || deb15 || shom));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strb_d <= 1'b0;
      dec_q  <= 1'b0;
    end else begin
      strb_d <= strb_in;
      if (strb_in && !strb_d) dec_q <= dec_logic;
    end
  end

  assign rna_dec = mode.test_du ? t_out[1] : dec_q;
  assign strb    = mode.test_du ? t_out[2] : strb_in;

  always_comb begin
    case (obb.addr)
      3'd0:    obb_rdata = {15'd0, ovr_cond_en};
      3'd1:    obb_rdata = {12'd0, t_nn};
      3'd2:    obb_rdata = t_in;
      3'd3:    obb_rdata = {13'd0, t_out};
      3'd4:    obb_rdata = {10'd0, dec_logic, shom, deb15, nn_or, ovr, empty};
      default: obb_rdata = '0;
    endcase
  end

endmodule
