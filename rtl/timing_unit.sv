// timing_unit: Timing-Unit of the M-CARD. Runs one trigger sequence per
// accepted START and generates the internal timing of the whole trigger.
//
// A rising edge of START (or of the test start bit in TEST_TU mode) is
// accepted when the unit is enabled (WORK or TEST_TU), VETO is low and no
// event is in progress; BUSY then rises and further STARTs are ignored.
// Counted from the rising edge of BUSY, in 0.5 ns ticks:
//   V_CLK       one-tick strobe after V_DELAY      = 25 + v_delay ticks
//   SciFi_GATE  opens after SciFi_DELAY            = 25 + scifi_delay ticks
//               and stays open for SciFi_GATE PW   = 25 + gate_pw ticks
// (8-bit registers: 12.5 ns .. 140 ns in 0.5 ns steps). When both V_CLK has
// fired and the gate has closed, NN_DELAY = 12*(nn_delay_sel+1) ticks
// (6 ns .. 120 ns in 6 ns steps, a jumper on the board) later NN_CLK rises.
// STRB_DELAY = 2*(30 + strb_delay_sel) ticks (30 ns .. 285 ns in 1 ns steps,
// a hex switch) after the rising edge of NN_CLK the 20 ns STRB pulse is sent;
// its end closes the sequence and BUSY falls.
// In SINGLE_SHOT mode the unit stops after STRB with READY set (BUSY stays
// high so no event is accepted) until NEXT is written. A watchdog ends any
// sequence whose BUSY lasts WDOG_TICKS (10 ms) as if NEXT had been given.
// In TEST_TU mode the test register's T_NN_CLK bit also drives NN_CLK.
//
// On-board-bus registers (this design's map): 1 V_DELAY, 2 SciFi_DELAY,
// 3 SciFi_GATE PW (8 bits each, read/write), 4 control: write bit0 = NEXT
// pulse, bit1 = T_START, bit2 = T_NN_CLK; read {13'b0..., busy, ready,
// t_nn_clk, t_start} in bits 3..0. Register 0 is the M-Mode register of the
// VMEbus interface.
//
// The delays, their ranges and resolutions, the STRB width, the watchdog and
// the single-shot and test behaviour follow the description. The NN_CLK
// width (NN_CLK_W), the tick-based implementation of the analog delay lines
// and the register map are this design's choices.
module timing_unit
  import rna_pkg::*;
#(
  parameter int unsigned STRB_W     = 40,        // 20 ns
  parameter int unsigned NN_CLK_W   = 40,        // 20 ns
  parameter int unsigned WDOG_TICKS = 20000000   // 10 ms
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mmode_t      mode,
  input  logic        start,           // T0_START from trigger control
  input  logic        veto,
  input  logic [4:0]  nn_delay_sel,    // jumper, 0..19
  input  logic [7:0]  strb_delay_sel,  // hex switches
  input  obb_req_t    obb,
  output logic [15:0] obb_rdata,
  output logic        busy,
  output logic        ready,
  output logic        v_clk,           // one-tick strobe
  output logic        scifi_gate,
  output logic        nn_clk,
  output logic        strb
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_NNW, S_NNC, S_STB, S_HOLD} state_e;
  state_e state;

  logic [7:0]  v_delay, scifi_delay, gate_pw;
  logic        t_start, t_nn_clk, next_p;
  logic [9:0]  cnt;
  logic        v_done, g_done;
  logic        start_d;
  logic        nn_clk_seq;
  logic [$clog2(WDOG_TICKS+1)-1:0] wdog;

  logic enable, start_src, start_edge;
  logic [9:0] vdel, sdel, gend, nndel, sbdel;

  assign enable    = (mode.work && mode.loaded) || mode.test_tu;
  assign start_src = mode.test_tu ? t_start : start;
  assign start_edge = start_src && !start_d;

  assign vdel  = 10'd25 + 10'(v_delay);
  assign sdel  = 10'd25 + 10'(scifi_delay);
  assign gend  = sdel + 10'd25 + 10'(gate_pw);
  assign nndel = 10'd12 * (10'(nn_delay_sel > 5'd19 ? 5'd19 : nn_delay_sel) + 10'd1);
  assign sbdel = 10'd2 * (10'd30 + 10'(strb_delay_sel));

  // register file
  wire wr_tu = obb.wr && obb.cs[CHIP_TU];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_delay     <= '0;
      scifi_delay <= '0;
      gate_pw     <= 8'd55;  // 40 ns
      t_start     <= 1'b0;
      t_nn_clk    <= 1'b0;
      next_p      <= 1'b0;
    end else begin
      next_p <= 1'b0;
      if (wr_tu) begin
        case (obb.addr)
          3'd1: v_delay     <= obb.wdata[7:0];
          3'd2: scifi_delay <= obb.wdata[7:0];
          3'd3: gate_pw     <= obb.wdata[7:0];
          3'd4: begin
            next_p   <= obb.wdata[0];
            t_start  <= obb.wdata[1];
            t_nn_clk <= obb.wdata[2];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (obb.addr)
      3'd1:    obb_rdata = {8'd0, v_delay};
      3'd2:    obb_rdata = {8'd0, scifi_delay};
      3'd3:    obb_rdata = {8'd0, gate_pw};
      3'd4:    obb_rdata = {12'd0, busy, ready, t_nn_clk, t_start};
      default: obb_rdata = '0;
    endcase
  end

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      v_done     <= 1'b0;
      g_done     <= 1'b0;
      start_d    <= 1'b0;
      v_clk      <= 1'b0;
      scifi_gate <= 1'b0;
      nn_clk_seq <= 1'b0;
      strb       <= 1'b0;
      wdog       <= '0;
    end else begin
      start_d <= start_src;
      v_clk   <= 1'b0;
      wdog    <= (state == S_IDLE) ? '0 : wdog + 1'b1;
      if (state != S_IDLE && wdog == $bits(wdog)'(WDOG_TICKS - 1)) begin
        state      <= S_IDLE;
        scifi_gate <= 1'b0;
        nn_clk_seq <= 1'b0;
        strb       <= 1'b0;
      end else begin
        case (state)
          S_IDLE: if (enable && !veto && start_edge) begin
            state  <= S_RUN;
            cnt    <= '0;
            v_done <= 1'b0;
            g_done <= 1'b0;
          end
          S_RUN: begin
            cnt <= cnt + 1'b1;
            if (cnt == vdel) begin
              v_clk  <= 1'b1;
              v_done <= 1'b1;
            end
            if (cnt == sdel) scifi_gate <= 1'b1;
            if (cnt == gend) begin
              scifi_gate <= 1'b0;
              g_done     <= 1'b1;
            end
            if (v_done && g_done) begin
              state <= S_NNW;
              cnt   <= 10'd1;
            end
          end
          S_NNW: begin
            cnt <= cnt + 1'b1;
            if (cnt >= nndel) begin
              state      <= S_NNC;
              nn_clk_seq <= 1'b1;
              cnt        <= 10'd1;
            end
          end
          S_NNC: begin
            cnt <= cnt + 1'b1;
            if (cnt == 10'(NN_CLK_W)) nn_clk_seq <= 1'b0;
            if (cnt >= sbdel) begin
              nn_clk_seq <= 1'b0;
              strb       <= 1'b1;
              state      <= S_STB;
              cnt        <= 10'd1;
            end
          end
          S_STB: begin
            cnt <= cnt + 1'b1;
            if (cnt >= 10'(STRB_W)) begin
              strb  <= 1'b0;
              state <= mode.single_shot ? S_HOLD : S_IDLE;
            end
          end
          S_HOLD: if (next_p) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy   = (state != S_IDLE);
  assign ready  = (state == S_HOLD);
  assign nn_clk = nn_clk_seq || (mode.test_tu && t_nn_clk);

endmodule
