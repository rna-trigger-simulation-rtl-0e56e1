// tb_rna_trigger: end-to-end test of the complete RNA trigger at its default
// parameters, with four NN-CARD stand-ins (nn_card_model) on its outputs.
//
// Over the VMEbus the test loads the four look-up tables (Pattern-Unit
// tables with the overflow pre-fill, the whole MIND-LUT, the HITS-LUT with
// its pre-fill), programs the Timing-Unit and switches to LOADED + WORK.
// Then it plays events: SciFi hits arrive 150 ns before START and pass the
// FDR delay, the hodoscope hits arrive 20 ns after START. Every event is
// worked out here from the hit lists alone (per-card closest pairs and hit
// counts, card selection, hodoscope positions, NN-PATTERNs, the NN rule and
// the decision equations) and compared with the NN-PATTERNs latched by the
// NN-CARDs, SEL1..4, RNA_DEC and the single STRB per event. The time from
// START to STRB is checked against the 300 ns decision budget of the M-CARD.
// Each mechanism of the design is counted and must occur at least once:
// EMPTY, SciFi / hodoscope overflow, DEB15, SHOM, a single hit sent twice, a
// pair across two FDR-CARDs, a distance tie between C-CARDs, positive and
// negative NN answers and decisions, VETO, START while BUSY, single-shot
// READY/NEXT and the OVERFLOW-condition switch.
module tb_rna_trigger;
  import rna_pkg::*;
  import tb_rna_ref_pkg::*;

  localparam logic [3:0] MCARD = 4'h1;
  localparam int FDR_STEPS = 30;  // 150 ns
  localparam int V_DELAY   = 30;  // 12.5 + 15 ns
  localparam int EVENTS    = 400;

  logic         clk = 0, vcc_ok = 0, sys_reset_n = 1;
  logic [239:0] scifi = '0, scifi_fanout;
  logic [17:0]  vl = '0, vr = '0;
  logic         t0_start = 0, veto = 0, busy, rna_dec, strb;
  logic [25:0]  nn_pat [4];
  logic [3:0]   nn_clk, nn_dec, nn_loaded = 4'hF;
  logic [3:0]   m_card_no = MCARD;
  logic [3:0]   fdr_bcd_tens [4], fdr_bcd_units [4];
  logic [4:0]   nn_delay_sel = 5'd2;
  logic [7:0]   strb_delay_sel = 8'd20;
  logic         vme_as_n = 1, vme_lword_n = 1, vme_write_n = 1;
  logic [1:0]   vme_ds_n = 2'b11;
  logic [5:0]   vme_am = 6'h29;
  logic [15:1]  vme_a = '0;
  logic [15:0]  vme_d_in = '0, vme_d_out;
  logic         vme_d_oe, vme_dtack_n, vme_berr_n, vme_sysfail_n;
  logic         scifi_gate;
  logic [3:0]   cc_sel;
  logic [9:0]   leds;

  rna_trigger dut (.*);

  for (genvar k = 0; k < 4; k++) begin : g_nn
    nn_card_model u_nn (.nn_pat(nn_pat[k]), .nn_clk(nn_clk[k]), .nn_dec(nn_dec[k]));
  end

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int n_strb = 0;
  logic [25:0] pat_seen [4];
  logic [3:0]  sel_seen;
  always @(posedge strb) n_strb++;
  // decision time: first START of an event to its STRB (one clock period = 0.5 ns)
  time t_start, t_strb, t_dec_max = 0;
  always @(posedge t0_start) if (!busy) t_start = $time;
  always @(posedge strb) t_strb = $time;
  always @(posedge nn_clk[0]) begin
    for (int k = 0; k < 4; k++) pat_seen[k] = nn_pat[k];
    sel_seen = cc_sel;
  end

  // mechanism counters
  int c_empty, c_scifi_ovr, c_vh_ovr, c_deb15, c_shom, c_single_dup, c_cross_fdr,
      c_tie, c_nn_pos, c_nn_neg, c_dec_pos, c_dec_neg, c_veto, c_busy_start,
      c_single_shot, c_ovr_cond;

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

  // ---------------- reference model ----------------
  typedef struct {
    int d, h, p1, p2;
  } card_t;

  function automatic card_t ref_card(bit hit [241], int k);
    card_t c;
    int lo, hi, n, first, bd, bi, prev;
    lo = 64*k + 1; hi = (64*k + 80 > 240) ? 240 : 64*k + 80;
    n = 0; first = 0; bd = 1000; bi = 0; prev = -1; c.h = 0;
    for (int col = lo; col <= hi; col++) if (hit[col]) begin
      n++;
      if (col <= 64*k + 64) c.h++;
      if (first == 0) first = col;
      if (prev > 0 && col - prev < bd) begin bd = col - prev; bi = prev; end
      prev = col;
    end
    if (c.h > 15) c.h = 15;
    if (n == 0)         begin c.d = 15; c.p1 = 0; c.p2 = 0; end
    else if (n == 1)    begin c.d = 0;  c.p1 = first; c.p2 = first; end
    else if (bd >= 15)  begin c.d = 15; c.p1 = 0; c.p2 = 0; end
    else                begin c.d = bd; c.p1 = bi; c.p2 = bi + bd; end
    return c;
  endfunction

  task automatic vh_ref(logic [17:0] m, output int n, output int a, output int b);
    n = 0; a = 0; b = 0;
    for (int i = 0; i < 18; i++) if (m[i]) begin
      n++;
      if (n == 1) a = i + 1; else if (n == 2) b = i + 1;
    end
    if (n > 2 || n == 0) begin a = 0; b = 0; end
    if (n == 1) b = 0;
  endtask

  // ---------------- one event ----------------
  task automatic play(bit hit [241], logic [17:0] mvl, logic [17:0] mvr, bit ovr_cond,
                      bit busy_start, bit single_shot);
    card_t c [4];
    int best, tnh, nvl, nvr, l1, l2, r1, r2, sp1, sp2, pairs_d [$];
    logic all15, ll, s_empty, s_single, s_ovr, empty, ovr, deb15, shom, nn_or, dec;
    logic [3:0] nnd, ava_ok;
    logic [239:0] pulse;
    int strb0;

    for (int k = 0; k < 4; k++) c[k] = ref_card(hit, k);
    best = -1;
    for (int v = 1; v <= 14 && best < 0; v++) for (int k = 0; k < 4; k++) if (best < 0 && c[k].d == v) best = k;
    for (int k = 0; k < 4; k++) if (best < 0 && c[k].d == 0) best = k;
    if (best < 0) best = 0;
    all15 = 1; ll = 1; tnh = 0;
    for (int k = 0; k < 4; k++) begin
      if (c[k].d != 15) all15 = 0;
      if (c[k].d != 0 && c[k].d != 15) ll = 0;
      tnh += c[k].h;
    end
    ll = ll && !all15;
    s_empty = (tnh == 0); s_single = (tnh == 1); s_ovr = (tnh > 5);
    vh_ref(mvl, nvl, l1, l2);
    vh_ref(mvr, nvr, r1, r2);
    sp1 = c[best].p1; sp2 = c[best].p2;
    nnd[0] = nn_rule_fields(sp1, sp2, l1, r1);
    nnd[1] = nn_rule_fields(sp1, sp2, l1, r2);
    nnd[2] = nn_rule_fields(sp1, sp2, l2, r1);
    nnd[3] = nn_rule_fields(sp1, sp2, l2, r2);
    ava_ok[0] = (nvl == 1 || nvl == 2) && (nvr == 1 || nvr == 2);
    ava_ok[1] = (nvl == 1 || nvl == 2) && (nvr == 2);
    ava_ok[2] = (nvl == 2) && (nvr == 1 || nvr == 2);
    ava_ok[3] = (nvl == 2) && (nvr == 2);
    empty = s_empty || nvl == 0 || nvr == 0;
    ovr   = s_ovr || nvl > 2 || nvr > 2;
    deb15 = all15 && !s_empty;
    shom  = ll && !s_single;
    nn_or = |(nnd & ava_ok);
    dec   = ovr_cond ? (nn_or && !(empty || deb15 || shom || ovr))
                     : (ovr || (nn_or && !(empty || deb15 || shom)));

    // mechanism counters
    if (empty) c_empty++;
    if (s_ovr) c_scifi_ovr++;
    if (nvl > 2 || nvr > 2) c_vh_ovr++;
    if (deb15) c_deb15++;
    if (shom) c_shom++;
    if (c[best].d == 0 && !shom && !s_empty) c_single_dup++;
    if (c[best].d > 0 && c[best].d < 15 && ((sp1 - 1) / 64 != (sp2 - 1) / 64)) c_cross_fdr++;
    for (int k = 0; k < 4; k++) if (k != best && c[k].d == c[best].d && c[k].d > 0 && c[k].d < 15) begin
      c_tie++; break;
    end
    if (nnd != 0) c_nn_pos++; else c_nn_neg++;
    if (dec) c_dec_pos++; else c_dec_neg++;
    if (ovr_cond && ovr) c_ovr_cond++;

    // stimulus
    pulse = '0;
    for (int col = 1; col <= 240; col++) if (hit[col]) pulse[col-1] = 1'b1;
    strb0 = n_strb;
    @(negedge clk) scifi = pulse;
    repeat (40) @(negedge clk);
    scifi = '0;
    repeat (260) @(negedge clk);
    t0_start = 1;
    repeat (20) @(negedge clk);
    t0_start = 0;
    repeat (20) @(negedge clk);
    vl = mvl; vr = mvr;
    repeat (40) @(negedge clk);
    vl = '0; vr = '0;
    if (busy_start) begin
      check("busy before 2nd START", busy, 1);
      t0_start = 1; repeat (10) @(negedge clk); t0_start = 0;
      c_busy_start++;
    end
    if (single_shot) begin
      wait (leds[7] && n_strb == strb0 + 1);
      repeat (100) @(negedge clk);
      check("single-shot holds BUSY", busy, 1);
      begin
        logic [15:0] st;
        vrd(0, 0, st);
        check("READY in status", st[12], 1);
      end
      vwr(0, 4, 16'h0001);                                  // NEXT
      c_single_shot++;
    end
    wait (busy == 0);
    repeat (4) @(negedge clk);
    check("one STRB", n_strb - strb0, 1);
    check("decision time below 300 ns", (t_strb - t_start) < 300 * 2 * 2, 1);
    if (t_strb - t_start > t_dec_max) t_dec_max = t_strb - t_start;
    check("SEL", sel_seen, longint'(1) << best);
    for (int k = 0; k < 4; k++) begin
      check("pattern pos1", pat_field(pat_seen[k], 0, 8), sp1);
      check("pattern pos2", pat_field(pat_seen[k], 8, 8), sp2);
      check("pattern VL", pat_field(pat_seen[k], 16, 5), (k < 2) ? l1 : l2);
      check("pattern VR", pat_field(pat_seen[k], 21, 5), (k % 2 == 0) ? r1 : r2);
    end
    check("NN answers", nn_dec, nnd);
    check("RNA_DEC", rna_dec, dec);
    check("fanout idle", scifi_fanout, '0);
    repeat (20) @(negedge clk);
  endtask

  // ---------------- event generators ----------------
  task automatic gen(int kind, output bit hit [241], output logic [17:0] mvl, output logic [17:0] mvr);
    int a, d;
    foreach (hit[i]) hit[i] = 0;
    case (kind)
      0: ;                                                        // empty SciFi
      1: hit[$urandom_range(1, 240)] = 1;                         // single hit
      2: begin                                                    // close pair
           d = $urandom_range(1, 8); a = $urandom_range(1, 240 - d);
           hit[a] = 1; hit[a + d] = 1;
         end
      3: begin                                                    // pair across FDR boundary
           a = 64 * $urandom_range(1, 3) - $urandom_range(0, 3);
           hit[a] = 1; hit[a + $urandom_range(1, 4)] = 1;
         end
      4: begin                                                    // far pair -> DEB15
           a = $urandom_range(1, 200); hit[a] = 1; hit[a + $urandom_range(15, 30)] = 1;
         end
      5: begin hit[$urandom_range(1, 50)] = 1; hit[$urandom_range(150, 240)] = 1; end  // SHOM
      6: for (int k = 0; k < $urandom_range(6, 12); k++) hit[$urandom_range(1, 240)] = 1; // overflow
      7: begin                                                    // equal pairs on two cards
           d = $urandom_range(1, 5);
           hit[10] = 1; hit[10 + d] = 1; hit[140] = 1; hit[140 + d] = 1;
         end
      default: for (int k = 0; k < $urandom_range(2, 5); k++) hit[$urandom_range(1, 240)] = 1;
    endcase
    mvl = '0; mvr = '0;
    a = $urandom_range(1, 2);
    if ($urandom_range(0, 9) == 0) a = $urandom_range(0, 3) == 0 ? 0 : 3;
    for (int k = 0; k < a; k++) mvl[$urandom_range(0, 17)] = 1'b1;
    a = $urandom_range(1, 2);
    if ($urandom_range(0, 9) == 0) a = $urandom_range(0, 3) == 0 ? 0 : 3;
    for (int k = 0; k < a; k++) mvr[$urandom_range(0, 17)] = 1'b1;
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hit [241];
    logic [17:0] mvl, mvr;
    for (int k = 0; k < 4; k++) begin
      fdr_bcd_tens[k] = 4'(FDR_STEPS / 10); fdr_bcd_units[k] = 4'(FDR_STEPS % 10);
    end
    repeat (5) @(negedge clk); vcc_ok = 1;
    repeat (40) @(negedge clk);
    check("SYSFAIL before loading", vme_sysfail_n, 0);
    load_all();
    // fanout passes the detector signals straight through
    @(negedge clk) scifi = {8'hA5, 232'd0} | 240'h3;
    #1 check("fanout", scifi_fanout, {8'hA5, 232'd0} | 240'h3);
    @(negedge clk) scifi = '0;
    repeat (400) @(negedge clk);
    for (int e = 0; e < EVENTS; e++) begin
      gen(e % 9, hit, mvl, mvr);
      play(hit, mvl, mvr, 1'b0, (e % 25) == 3, 1'b0);
    end
    // VETO blocks START
    veto = 1;
    @(negedge clk) t0_start = 1; repeat (10) @(negedge clk); t0_start = 0;
    repeat (50) @(negedge clk);
    check("VETO", busy, 0);
    c_veto++;
    veto = 0;
    // OVERFLOW condition enabled: needs LOADED cleared to write the DU register
    vwr(0, 0, 16'h0000); vwr(2, 0, 16'h0001); vwr(0, 0, 16'h0003);
    for (int e = 0; e < 40; e++) begin
      gen((e % 2) ? 6 : 2, hit, mvl, mvr);
      play(hit, mvl, mvr, 1'b1, 1'b0, 1'b0);
    end
    // single-shot mode
    vwr(0, 0, 16'h0007);
    for (int e = 0; e < 3; e++) begin
      gen(2, hit, mvl, mvr);
      play(hit, mvl, mvr, 1'b1, 1'b0, 1'b1);
    end
    $display("longest START to STRB: %0d ticks (0.5 ns each)", t_dec_max / 2);
    $display("mechanisms: empty=%0d scifi_ovr=%0d vh_ovr=%0d deb15=%0d shom=%0d single_dup=%0d cross_fdr=%0d tie=%0d nn_pos=%0d nn_neg=%0d dec_pos=%0d dec_neg=%0d veto=%0d busy_start=%0d single_shot=%0d ovr_cond=%0d",
             c_empty, c_scifi_ovr, c_vh_ovr, c_deb15, c_shom, c_single_dup, c_cross_fdr, c_tie,
             c_nn_pos, c_nn_neg, c_dec_pos, c_dec_neg, c_veto, c_busy_start, c_single_shot, c_ovr_cond);
    check("mech empty", c_empty > 0, 1);
    check("mech scifi_ovr", c_scifi_ovr > 0, 1);
    check("mech vh_ovr", c_vh_ovr > 0, 1);
    check("mech deb15", c_deb15 > 0, 1);
    check("mech shom", c_shom > 0, 1);
    check("mech single_dup", c_single_dup > 0, 1);
    check("mech cross_fdr", c_cross_fdr > 0, 1);
    check("mech tie", c_tie > 0, 1);
    check("mech nn_pos", c_nn_pos > 0, 1);
    check("mech nn_neg", c_nn_neg > 0, 1);
    check("mech dec_pos", c_dec_pos > 0, 1);
    check("mech dec_neg", c_dec_neg > 0, 1);
    check("mech veto", c_veto > 0, 1);
    check("mech busy_start", c_busy_start > 0, 1);
    check("mech single_shot", c_single_shot > 0, 1);
    check("mech ovr_cond", c_ovr_cond > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
