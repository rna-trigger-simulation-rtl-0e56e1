// tb_pattern_unit: self-checking test of the Pattern-Unit. In LOAD_SRAM mode
// both LUTs are pre-filled with the overflow word by the fill command and
// then all hit-maps with at most two hits are written. In WORK mode random
// VL/VR hit-maps with 0..4 hits are registered with V_CLK and the positions
// and flags are compared with values counted directly from the hit-maps;
// a hit-map change without V_CLK must not show. TEST_OVRALL (test patterns),
// TEST_NN (test positions) and TEST_PU (LUT readback) are checked too.
module tb_pattern_unit;
  import rna_pkg::*;
  import tb_rna_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  mmode_t      mode;
  logic [17:0] vl = '0, vr = '0;
  logic        v_clk = 0;
  obb_req_t    obb;
  logic [15:0] obb_rdata;
  logic [4:0]  vl_1p, vl_2p, vr_1p, vr_2p;
  logic        vl_empty, vr_empty, vl_ovr, vr_ovr;
  logic        vl_1p_ava, vl_2p_ava, vr_1p_ava, vr_2p_ava, fill_busy;
  int checks = 0, failures = 0;

  pattern_unit dut (.*);

  always #1 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [15:0] d);
    @(negedge clk);
    obb.cs = 4'b0010; obb.addr = a; obb.wdata = d; obb.wr = 1;
    @(negedge clk);
    obb.wr = 0;
  endtask

  task automatic load(bit side, logic [17:0] a);
    wr(0, a[15:0]); wr(1, {13'd0, side, a[17:16]}); wr(2, vlut_word(a));
  endtask

  // expected outputs of one arm, counted from the hit-map
  task automatic check_arm(string s, logic [17:0] p, logic [4:0] p1, logic [4:0] p2,
                           logic e, logic o, logic a1, logic a2);
    int n, x, y;
    n = 0; x = 0; y = 0;
    for (int i = 0; i < 18; i++) if (p[i]) begin n++; if (n == 1) x = i + 1; else if (n == 2) y = i + 1; end
    check({s, " empty"}, e, n == 0);
    check({s, " ovr"}, o, n > 2);
    check({s, " 1P"}, p1, (n == 1 || n == 2) ? x : 0);
    check({s, " 2P"}, p2, (n == 2) ? y : 0);
    check({s, " 1P_AVA"}, a1, n == 1 || n == 2);
    check({s, " 2P_AVA"}, a2, n == 2);
  endtask

  function automatic logic [17:0] rand_map(int nh);
    logic [17:0] m;
    m = '0;
    for (int k = 0; k < nh; k++) m[$urandom_range(0, 17)] = 1'b1;
    return m;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] lv, lr;
    mode = '0; obb = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // ---- load ----
    mode.load_sram = 1;
    wr(3, 0);
    @(negedge clk);
    check("fill started", fill_busy, 1);
    wait (fill_busy == 0);
    for (int side = 0; side < 2; side++) begin
      load(side[0], 18'd0);
      for (int i = 0; i < 18; i++) begin
        load(side[0], 18'(1) << i);
        for (int j = i + 1; j < 18; j++) load(side[0], (18'(1) << i) | (18'(1) << j));
      end
    end
    repeat (2) @(negedge clk);
    // ---- TEST_PU readback ----
    mode = '0; mode.test_pu = 1;
    for (int t = 0; t < 40; t++) begin
      lv = rand_map($urandom_range(0, 4));
      wr(0, lv[15:0]); wr(1, {13'd0, 1'(t & 1), lv[17:16]});
      @(negedge clk) obb.addr = 3'd2;
      #0.5;
      check("readback", obb_rdata, vlut_word(lv));
      check("no NN drive in TEST_PU", {vl_1p, vr_1p}, 0);
    end
    // ---- WORK ----
    mode = '0; mode.loaded = 1; mode.work = 1;
    for (int t = 0; t < 300; t++) begin
      lv = rand_map($urandom_range(0, 4));
      lr = rand_map($urandom_range(0, 4));
      @(negedge clk); vl = lv; vr = lr; v_clk = 1;
      @(negedge clk); v_clk = 0; vl = ~lv; vr = ~lr;   // change without V_CLK
      @(negedge clk);
      check_arm("VL", lv, vl_1p, vl_2p, vl_empty, vl_ovr, vl_1p_ava, vl_2p_ava);
      check_arm("VR", lr, vr_1p, vr_2p, vr_empty, vr_ovr, vr_1p_ava, vr_2p_ava);
    end
    // ---- TEST_OVRALL ----
    mode = '0; mode.test_ovrall = 1;
    for (int t = 0; t < 50; t++) begin
      lv = rand_map($urandom_range(0, 3));
      lr = rand_map($urandom_range(0, 3));
      wr(4, lv[15:0]); wr(6, lr[15:0]); wr(5, {12'd0, lr[17:16], lv[17:16]});
      @(negedge clk);
      check_arm("VL ovrall", lv, vl_1p, vl_2p, vl_empty, vl_ovr, vl_1p_ava, vl_2p_ava);
      check_arm("VR ovrall", lr, vr_1p, vr_2p, vr_empty, vr_ovr, vr_1p_ava, vr_2p_ava);
    end
    // ---- TEST_NN ----
    mode = '0; mode.test_nn = 1;
    wr(4, {6'd0, 5'd17, 5'd3}); wr(6, {6'd0, 5'd9, 5'd18});
    @(negedge clk);
    check("TEST_NN VL_1P", vl_1p, 3);
    check("TEST_NN VL_2P", vl_2p, 17);
    check("TEST_NN VR_1P", vr_1p, 18);
    check("TEST_NN VR_2P", vr_2p, 9);
    check("TEST_NN no flags", {vl_1p_ava, vl_empty, vl_ovr}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
