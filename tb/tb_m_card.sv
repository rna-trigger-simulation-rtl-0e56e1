// tb_m_card: self-checking test of the Master card on its own. The C-CARD
// values (four distances, four hit counts) and the NN-CARD answers are driven
// directly. Over the VMEbus the four look-up tables are loaded and the card
// is put into LOADED + WORK; then random events are played: START, the
// hodoscope hit-maps 20 ns later, static C-CARD values and NN answers. Each
// event is checked against values worked out here: SEL1..4, the four
// hodoscope positions at NN_CLK, RNA_DEC at STRB, and the Timing-Unit
// latency from START to STRB for the programmed delays.
module tb_m_card;
  import rna_pkg::*;
  import tb_rna_ref_pkg::*;

  localparam logic [3:0] MCARD = 4'h1;
  localparam int V_DELAY = 30;

  logic         clk = 0, vcc_ok = 0, sys_reset_n = 1;
  logic [3:0]   card_no = MCARD;
  logic         vme_as_n = 1, vme_lword_n = 1, vme_write_n = 1;
  logic [1:0]   vme_ds_n = 2'b11;
  logic [5:0]   vme_am = 6'h29;
  logic [15:1]  vme_a = '0;
  logic [15:0]  vme_d_in = '0, vme_d_out;
  logic         vme_d_oe, vme_dtack_n, vme_berr_n, vme_sysfail_n;
  logic [3:0]   nn_loaded = 4'hF;
  logic         start = 0, veto = 0, busy, rna_dec, strb;
  logic [4:0]   nn_delay_sel = 5'd4;
  logic [7:0]   strb_delay_sel = 8'd10;
  logic [17:0]  vl = '0, vr = '0;
  logic [15:0]  cc_min_dist = 16'hFFFF, cc_hits = '0;
  logic [3:0]   cc_sel;
  logic         scifi_gate;
  logic [4:0]   vl_1p, vl_2p, vr_1p, vr_2p;
  logic [3:0]   nn_clk, nn_dec = '0;
  logic         led_loaded, led_5v_ok, led_test, led_load, led_work, led_ss,
                led_start, led_busy, led_dtack, led_berr;

  m_card dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned tick = 0;
  int unsigned t_start, t_strb;
  logic [4:0] seen_vl1, seen_vl2, seen_vr1, seen_vr2;
  logic [3:0] seen_sel;
  always @(posedge clk) tick <= tick + 1;
  always @(posedge start) t_start = tick;
  always @(posedge strb) t_strb = tick;
  always @(posedge nn_clk[0]) begin
    seen_vl1 = vl_1p; seen_vl2 = vl_2p; seen_vr1 = vr_1p; seen_vr2 = vr_2p; seen_sel = cc_sel;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- VMEbus master ----------------
  task automatic vme(bit wr, logic [1:0] chip, logic [2:0] r, logic [15:0] wd, output logic [15:0] rd);
    int n;
    @(negedge clk);
    vme_a = {6'd0, MCARD, chip, r}; vme_write_n = !wr; vme_d_in = wd; vme_as_n = 0;
    vme_lword_n = 1; vme_am = 6'h2D;
    @(negedge clk) vme_ds_n = 2'b00;
    n = 0;
    while (vme_dtack_n && n < 50) begin @(negedge clk); n++; end
    if (vme_dtack_n) begin failures++; $display("FAIL VME no DTACK"); end
    rd = vme_d_out;
    vme_as_n = 1; vme_ds_n = 2'b11;
    @(negedge clk);
  endtask

  task automatic vwr(logic [1:0] chip, logic [2:0] r, logic [15:0] wd);
    logic [15:0] x;
    vme(1, chip, r, wd, x);
  endtask

  task automatic vrd(logic [1:0] chip, logic [2:0] r, output logic [15:0] rd);
    vme(0, chip, r, '0, rd);
  endtask

  task automatic load_all();
    logic [15:0] x, h;
    vwr(0, 0, 16'h0008);                                   // LOAD_SRAM
    // Pattern-Unit
    vwr(1, 3, 0);
    do vrd(1, 3, x); while (x[0]);
    for (int side = 0; side < 2; side++) begin
      for (int i = -1; i < 18; i++) for (int j = i; j < 18; j++) begin
        logic [17:0] m;
        if (i < 0 && j >= 0) continue;
        m = '0;
        if (i >= 0) m[i] = 1'b1;
        if (j >= 0) m[j] = 1'b1;
        vwr(1, 0, m[15:0]); vwr(1, 1, {13'd0, side[0], m[17:16]}); vwr(1, 2, vlut_word(m));
      end
    end
    // C-CARDs-Unit
    vwr(3, 1, 0);
    for (int a = 0; a < 65536; a++) begin
      vwr(3, 0, 16'(a)); vwr(3, 2, {12'd0, mind_word(16'(a))});
    end
    vwr(3, 1, 1);
    vwr(3, 3, 0);
    do vrd(3, 3, x); while (x[0]);
    for (int a = 0; a < 65536; a++) begin
      h = 16'(a);
      if (int'(h[3:0]) + h[7:4] + h[11:8] + h[15:12] <= 5) begin
        vwr(3, 0, h); vwr(3, 2, {12'd0, hits_word(h)});
      end
    end
    // check a few table entries by reading them back
    vwr(0, 0, 16'h0080);                                   // TEST_CU
    vwr(3, 1, 0); vwr(3, 0, 16'hF3F7); vrd(3, 2, x);
    check("MIND readback", x, mind_word(16'hF3F7));
    vwr(0, 0, 16'h0040);                                   // TEST_PU
    vwr(1, 0, 16'h0005); vwr(1, 1, 16'h0000); vrd(1, 2, x);
    check("VL-LUT readback", x, vlut_word(18'h5));
    // Timing-Unit and Decision-Unit
    vwr(0, 0, 16'h0000);
    vwr(0, 1, 16'(V_DELAY)); vwr(0, 2, 16'd0); vwr(0, 3, 16'd55);
    vwr(2, 0, 16'd0);
    vwr(0, 0, 16'h0003);                                   // LOADED + WORK
    vrd(0, 0, x);
    check("LOADED+WORK", x[1:0], 2'b11);
    check("SYSFAIL released", vme_sysfail_n, 1);
  endtask

  task automatic vh_ref(logic [17:0] m, output int n, output int a, output int b);
    n = 0; a = 0; b = 0;
    for (int i = 0; i < 18; i++) if (m[i]) begin
      n++;
      if (n == 1) a = i + 1; else if (n == 2) b = i + 1;
    end
    if (n > 2 || n == 0) begin a = 0; b = 0; end
    if (n == 1) b = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int npos = 0, nneg = 0;

  initial begin
    logic [15:0] d, h;
    logic [17:0] mvl, mvr;
    logic [3:0] nn;
    int best, tnh, nvl, nvr, l1, l2, r1, r2, lat;
    logic all15, ll, empty, ovr, deb15, shom, nn_or, dec;
    logic [3:0] ava_ok;
    repeat (5) @(negedge clk); vcc_ok = 1;
    repeat (40) @(negedge clk);
    load_all();
    for (int e = 0; e < 300; e++) begin
      for (int k = 0; k < 4; k++) begin
        case ($urandom_range(0, 3))
          0: d[4*k +: 4] = 4'd0;
          1: d[4*k +: 4] = 4'd15;
          default: d[4*k +: 4] = 4'($urandom_range(1, 15));
        endcase
        h[4*k +: 4] = (d[4*k +: 4] == 4'd15) ? 4'd0 : 4'($urandom_range(1, 3));
      end
      mvl = '0; mvr = '0;
      for (int k = 0; k < $urandom_range(0, 3); k++) mvl[$urandom_range(0, 17)] = 1'b1;
      for (int k = 0; k < $urandom_range(0, 3); k++) mvr[$urandom_range(0, 17)] = 1'b1;
      nn = 4'($urandom);
      // reference
      best = -1;
      for (int v = 1; v <= 14 && best < 0; v++) for (int k = 0; k < 4; k++) if (best < 0 && d[4*k +: 4] == 4'(v)) best = k;
      for (int k = 0; k < 4; k++) if (best < 0 && d[4*k +: 4] == 4'd0) best = k;
      if (best < 0) best = 0;
      all15 = (d == 16'hFFFF); ll = 1; tnh = 0;
      for (int k = 0; k < 4; k++) begin
        if (d[4*k +: 4] != 0 && d[4*k +: 4] != 15) ll = 0;
        tnh += int'(h[4*k +: 4]);
      end
      ll = ll && !all15;
      vh_ref(mvl, nvl, l1, l2);
      vh_ref(mvr, nvr, r1, r2);
      ava_ok[0] = (nvl == 1 || nvl == 2) && (nvr == 1 || nvr == 2);
      ava_ok[1] = (nvl == 1 || nvl == 2) && (nvr == 2);
      ava_ok[2] = (nvl == 2) && (nvr == 1 || nvr == 2);
      ava_ok[3] = (nvl == 2) && (nvr == 2);
      empty = (tnh == 0) || nvl == 0 || nvr == 0;
      ovr   = (tnh > 5) || nvl > 2 || nvr > 2;
      deb15 = all15 && tnh != 0;
      shom  = ll && tnh != 1;
      nn_or = |(nn & ava_ok);
      dec   = ovr || (nn_or && !(empty || deb15 || shom));
      // event
      cc_min_dist = d; cc_hits = h; nn_dec = nn;
      @(negedge clk) start = 1;
      repeat (20) @(negedge clk);
      start = 0;
      repeat (20) @(negedge clk);
      vl = mvl; vr = mvr;
      repeat (40) @(negedge clk);
      vl = '0; vr = '0;
      wait (busy == 0);
      repeat (3) @(negedge clk);
      check("SEL", seen_sel, longint'(1) << best);
      check("VL_1P", seen_vl1, l1);
      check("VL_2P", seen_vl2, l2);
      check("VR_1P", seen_vr1, r1);
      check("VR_2P", seen_vr2, r2);
      check("RNA_DEC", rna_dec, dec);
      if (dec) npos++; else nneg++;
      // START -> STRB: gate end (25+0 + 25+55 ticks after BUSY) + NN delay + STRB delay
      lat = int'(t_strb - t_start);
      check("latency", lat >= 105 + 12*5 + 2*40 && lat <= 105 + 12*5 + 2*40 + 6, 1);
      repeat (10) @(negedge clk);
    end
    check("both decisions seen", npos > 20 && nneg > 20, 1);
    $display("decisions: positive=%0d negative=%0d", npos, nneg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
