// vme_interface: VMEbus INTERFACE of the M-CARD, with the M-Mode / M-Status
// registers, the LOADED/WORK safety logic and the RESET logic.
//
// Slave access: the card answers only A16/D16 "short" accesses (address
// modifier 29h or 2Dh) whose address has A15..A10 = 0 and A9..A6 equal to
// the card number from the front-panel hex switch. A double-byte access
// (both data strobes, LWORD high) is carried out and acknowledged with
// DTACK; any other width (single-, triple-, quad-byte) is answered with
// BERR. A5..A4 select one of the four communication chips (TU, PU, DU, CU)
// and A3..A1 one of its 16-bit registers; address 0 (A5..A1 = 0) holds the
// M-Mode register (write) and the M-Status register (read). A write is
// forwarded to the chips as a one-cycle strobe on the on-board bus; a read
// puts the register address on the on-board bus and one tick later latches
// the selected chip's register. DTACK / BERR stay low until both
// data strobes are released.
//
// M-Mode bits (this design's order): 0 LOADED, 1 WORK, 2 SINGLE_SHOT,
// 3 LOAD_SRAM, 4 TEST_OVRALL, 5 TEST_TU, 6 TEST_PU, 7 TEST_CU, 8 TEST_NN,
// 9 TEST_DU, 15 RESET (self-clearing). Safety rules from the description:
// while LOADED, writes to every register except the NEXT/RESET register of
// the Timing-Unit (TU register 4) are dropped and no TEST or LOAD mode can
// be set; LOADED cannot be set together with any TEST or LOAD mode; WORK
// needs LOADED. M-Status: bits 9..0 the mode, 10 any TEST mode, 11 SYSFAIL
// active, 12 READY, 13 BUSY. SYSFAIL (active low) is asserted while the
// M-CARD or any of the four NN-CARDs is not LOADED.
//
// Reset: the board reset (unit_rst_n) is asserted while the supply monitor
// reports low voltage, while the VMEbus SYSRESET is active, and for
// RST_TICKS clock ticks after the RESET bit is written. It clears every
// register, so LOADED drops at once.
//
// The bus is assumed synchronous to the clock (no input synchronisers), the
// bit order of the two registers and the length of the RESET pulse are this
// design's choices; everything else follows the description.
module vme_interface
  import rna_pkg::*;
#(
  parameter int unsigned RST_TICKS = 16
) (
  input  logic        clk,
  input  logic        vcc_ok,          // supply monitor, low below ~4 V
  input  logic        sys_reset_n,     // VMEbus SYSRESET*
  input  logic [3:0]  card_no,         // hex switch
  // VMEbus (active-low strobes as on the bus)
  input  logic        as_n,
  input  logic [1:0]  ds_n,            // DS1*, DS0*
  input  logic        lword_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [15:1] a,
  input  logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  output logic        berr_n,
  output logic        sysfail_n,
  // board side
  input  logic [3:0]  nn_loaded,       // LOADED state of the NN-CARDs
  input  logic        busy,
  input  logic        ready,
  input  logic [15:0] chip_rdata [4],  // indexed by chip_e
  output obb_req_t    obb,
  output mmode_t      mode,
  output logic        unit_rst_n,
  output logic        led_test
);

  typedef enum logic [1:0] {V_IDLE, V_RD, V_ACK, V_ERR} vstate_e;
  vstate_e vstate;

  logic        ext_rst_n;
  logic [$clog2(RST_TICKS+1)-1:0] rst_cnt;
  logic        reset_req;
  logic        selected, am_ok, strobe, d16;
  logic [1:0]  chip;
  logic [2:0]  reg_no;
  logic        is_mreg;
  logic [15:0] status;
  logic        tests_any;
  logic        rd_mreg;
  logic [1:0]  rd_chip;

  assign ext_rst_n = vcc_ok && sys_reset_n;

  // ---------------- board reset ----------------
  always_ff @(posedge clk or negedge ext_rst_n) begin
    if (!ext_rst_n) begin
      rst_cnt    <= $bits(rst_cnt)'(RST_TICKS);
      unit_rst_n <= 1'b0;
    end else begin
      if (reset_req)             rst_cnt <= $bits(rst_cnt)'(RST_TICKS);
      else if (rst_cnt != 0)     rst_cnt <= rst_cnt - 1'b1;
      unit_rst_n <= (rst_cnt == 0) && !reset_req;
    end
  end

  // ---------------- address decoding ----------------
  assign am_ok    = (am == 6'h29) || (am == 6'h2D);
  assign selected = (a[15:10] == 6'd0) && (a[9:6] == card_no);
  assign strobe   = !as_n && (ds_n != 2'b11);
  assign d16      = (ds_n == 2'b00) && lword_n;
  assign chip     = a[5:4];
  assign reg_no   = a[3:1];
  assign is_mreg  = (a[5:1] == 5'd0);

  assign tests_any = mode.load_sram || mode.test_ovrall || mode.test_tu ||
                     mode.test_pu || mode.test_cu || mode.test_nn || mode.test_du;
  assign status = {2'b00, busy, ready, !sysfail_n, tests_any, mode};
  assign sysfail_n = mode.loaded && (&nn_loaded);
  assign led_test  = tests_any;

  // ---------------- bus cycle ----------------
  always_ff @(posedge clk or negedge ext_rst_n) begin
    if (!ext_rst_n) begin
      vstate    <= V_IDLE;
      d_out     <= '0;
      obb       <= '0;
      reset_req <= 1'b0;
      rd_mreg   <= 1'b0;
      rd_chip   <= '0;
    end else begin
      obb.wr    <= 1'b0;
      reset_req <= 1'b0;
      case (vstate)
        V_IDLE: if (strobe && selected && am_ok) begin
          if (!d16) begin
            vstate <= V_ERR;
          end else begin
            vstate <= V_ACK;
            if (!write_n) begin
              if (is_mreg) begin
                reset_req <= d_in[15];
              end else if (!mode.loaded || (chip == CHIP_TU && reg_no == 3'd4)) begin
                obb.cs    <= 4'b0001 << chip;
                obb.addr  <= reg_no;
                obb.wdata <= d_in;
                obb.wr    <= 1'b1;
              end
            end else begin
              // present the register address first, take the data a tick later
              vstate   <= V_RD;
              obb.cs   <= 4'b0001 << chip;
              obb.addr <= reg_no;
              rd_mreg  <= is_mreg;
              rd_chip  <= chip;
            end
          end
        end
        V_RD: begin
          d_out  <= rd_mreg ? status : chip_rdata[rd_chip];
          vstate <= V_ACK;
        end
        V_ACK, V_ERR: if (ds_n == 2'b11) vstate <= V_IDLE;
        default: vstate <= V_IDLE;
      endcase
    end
  end

  assign dtack_n = (vstate != V_ACK);
  assign berr_n  = (vstate != V_ERR);
  assign d_oe    = (vstate == V_ACK) && write_n;

  // ---------------- M-Mode register and safety logic ----------------
  wire mode_wr = (vstate == V_IDLE) && strobe && selected && am_ok && d16 &&
                 !write_n && is_mreg && !d_in[15];

  always_ff @(posedge clk or negedge unit_rst_n) begin
    if (!unit_rst_n) begin
      mode <= '0;
    end else if (mode_wr) begin
      if (mode.loaded) begin
        // only LOADED, WORK and SINGLE_SHOT may change; TEST / LOAD inhibited
        mode.loaded      <= d_in[0];
        mode.work        <= d_in[0] && d_in[1];
        mode.single_shot <= d_in[2];
      end else begin
        mode.load_sram   <= d_in[3];
        mode.test_ovrall <= d_in[4];
        mode.test_tu     <= d_in[5];
        mode.test_pu     <= d_in[6];
        mode.test_cu     <= d_in[7];
        mode.test_nn     <= d_in[8];
        mode.test_du     <= d_in[9];
        mode.loaded      <= d_in[0] && (d_in[9:3] == '0);
        mode.work        <= d_in[0] && (d_in[9:3] == '0) && d_in[1];
        mode.single_shot <= d_in[2];
      end
    end
  end

endmodule
