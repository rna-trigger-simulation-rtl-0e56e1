// tb_ccards_unit: self-checking test of the C-CARDs-Unit. Loads the whole
// MIND-LUT and, after the overflow pre-fill, the non-overflow part of the
// HITS-LUT over the on-board bus. In WORK mode random and corner-case
// distance / hit-count sets are applied and SEL1..4 (exactly one line),
// MIN_DIST15, LL_SINGLE_HIT, SciFi_EMPTY, SINGLE_HIT and SciFi_OVR are
// compared with the selection rule worked out here. Also checks TEST_OVRALL,
// TEST_CU readback and that no SEL line is driven outside those modes.
module tb_ccards_unit;
  import rna_pkg::*;
  import tb_rna_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  mmode_t      mode;
  logic [15:0] min_dist = '0, hits = '0;
  obb_req_t    obb;
  logic [15:0] obb_rdata;
  logic [3:0]  sel;
  logic        min_dist15, ll_single_hit, scifi_empty, single_hit, scifi_ovr, fill_busy;
  int checks = 0, failures = 0;

  ccards_unit dut (.*);

  always #1 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (d=%h h=%h)", what, got, exp, min_dist, hits);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [15:0] d);
    @(negedge clk);
    obb.cs = 4'b1000; obb.addr = a; obb.wdata = d; obb.wr = 1;
    @(negedge clk);
    obb.wr = 0;
  endtask

  task automatic expect_all(logic [15:0] d, logic [15:0] h);
    int best, s;
    logic all15, ll;
    // smallest of 1..14 wins, lowest card first; else a single hit; else card 1
    best = -1;
    for (int v = 1; v <= 14 && best < 0; v++)
      for (int k = 0; k < 4; k++) if (best < 0 && d[4*k +: 4] == 4'(v)) best = k;
    for (int k = 0; k < 4; k++) if (best < 0 && d[4*k +: 4] == 4'd0) best = k;
    if (best < 0) best = 0;
    all15 = (d == 16'hFFFF);
    ll = 1'b1;
    for (int k = 0; k < 4; k++) if (d[4*k +: 4] != 0 && d[4*k +: 4] != 15) ll = 1'b0;
    ll = ll && !all15;
    s = h[3:0] + h[7:4] + h[11:8] + h[15:12];
    check("sel", sel, 1 << best);
    check("min_dist15", min_dist15, all15);
    check("ll_single_hit", ll_single_hit, ll);
    check("empty", scifi_empty, s == 0);
    check("single", single_hit, s == 1);
    check("ovr", scifi_ovr, s > 5);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, h;
    mode = '0; obb = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // ---- load ----
    mode.load_sram = 1;
    wr(1, 0);  // MIND-LUT
    for (int a = 0; a < 65536; a++) begin
      wr(0, 16'(a)); wr(2, {12'd0, mind_word(16'(a))});
    end
    wr(1, 1);  // HITS-LUT
    wr(3, 0);
    wait (fill_busy == 0);
    for (int a = 0; a < 65536; a++) begin
      h = 16'(a);
      if (int'(h[3:0]) + h[7:4] + h[11:8] + h[15:12] <= 5) begin
        wr(0, h); wr(2, {12'd0, hits_word(h)});
      end
    end
    repeat (2) @(negedge clk);
    // ---- outside WORK: no select ----
    mode = '0;
    @(negedge clk);
    check("no sel when idle", sel, 0);
    // ---- TEST_CU readback ----
    mode.test_cu = 1;
    for (int t = 0; t < 30; t++) begin
      d = 16'($urandom);
      wr(0, d); wr(1, 0);
      @(negedge clk) obb.addr = 3'd2; #0.5;
      check("MIND readback", obb_rdata, mind_word(d));
      wr(1, 1);
      @(negedge clk) obb.addr = 3'd2; #0.5;
      check("HITS readback", obb_rdata, hits_word(d));
      check("no sel in TEST_CU", sel, 0);
    end
    // ---- WORK ----
    mode = '0; mode.loaded = 1; mode.work = 1;
    foreach (d_cases[i]) begin
      min_dist = d_cases[i]; hits = 16'h0010 << (i % 3);
      #1 expect_all(min_dist, hits);
    end
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 4; k++) begin
        case ($urandom_range(0, 3))
          0: min_dist[4*k +: 4] = 4'd0;
          1: min_dist[4*k +: 4] = 4'd15;
          default: min_dist[4*k +: 4] = 4'($urandom);
        endcase
        hits[4*k +: 4] = 4'($urandom_range(0, 3));
      end
      #1 expect_all(min_dist, hits);
    end
    // ---- TEST_OVRALL ----
    mode = '0; mode.test_ovrall = 1;
    min_dist = 16'h1111; hits = 16'h0000;
    for (int t = 0; t < 40; t++) begin
      d = 16'($urandom); h = 16'($urandom) & 16'h1111;
      wr(4, d); wr(5, h);
      #1 expect_all(d, h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] d_cases [8] = '{16'hFFFF, 16'hF0FF, 16'h00FF, 16'h0000,
                               16'h7777, 16'h3F5F, 16'hE0E0, 16'h1F0E};
endmodule
