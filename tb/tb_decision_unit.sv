// tb_decision_unit: self-checking test of the Decision-Unit. Random NN
// decisions and flags are applied in WORK mode with both settings of the
// OVERFLOW-condition bit; RNA_DEC after the rising edge of STRB is compared
// with the decision equations written out here, and must hold when the
// inputs change afterwards. TEST_OVRALL (test NN decisions), TEST_DU (logic
// inputs and the RNA_DEC / STRB pins from test registers, logic outputs read
// back) are checked as well.
module tb_decision_unit;
  import rna_pkg::*;

  logic        clk = 0, rst_n = 0;
  mmode_t      mode;
  logic [3:0]  nn_dec = '0;
  du_flags_t   flags;
  logic        strb_in = 0;
  obb_req_t    obb;
  logic [15:0] obb_rdata;
  logic        rna_dec, strb;
  int checks = 0, failures = 0;

  decision_unit dut (.*);

  always #1 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [15:0] d);
    @(negedge clk);
    obb.cs = 4'b0100; obb.addr = a; obb.wdata = d; obb.wr = 1;
    @(negedge clk);
    obb.wr = 0;
  endtask

  function automatic logic ref_dec(logic [3:0] nn, du_flags_t f, logic ovr_en);
    logic empty, ovr, spread, nn_ok;
    empty  = f.vl_empty | f.vr_empty | f.scifi_empty;
    ovr    = f.vl_ovr | f.vr_ovr | f.scifi_ovr;
    spread = (f.min_dist15 & ~f.scifi_empty) | (f.ll_single_hit & ~f.single_hit);
    nn_ok  = (nn[0] & f.vl_1p_ava & f.vr_1p_ava) | (nn[1] & f.vl_1p_ava & f.vr_2p_ava) |
             (nn[2] & f.vl_2p_ava & f.vr_1p_ava) | (nn[3] & f.vl_2p_ava & f.vr_2p_ava);
    return ovr_en ? (nn_ok & ~(empty | spread | ovr)) : (ovr | (nn_ok & ~(empty | spread)));
  endfunction

  function automatic du_flags_t rand_flags();
    du_flags_t f;
    f = du_flags_t'($urandom);
    // make the rare flags rarer so that positive decisions occur
    if ($urandom_range(0, 2) != 0) {f.vl_empty, f.vr_empty, f.scifi_empty} = '0;
    if ($urandom_range(0, 2) != 0) {f.vl_ovr, f.vr_ovr, f.scifi_ovr} = '0;
    if ($urandom_range(0, 2) != 0) {f.min_dist15, f.ll_single_hit} = '0;
    return f;
  endfunction

  task automatic event_once(logic ovr_en);
    logic e;
    nn_dec = 4'($urandom);
    flags  = rand_flags();
    e = ref_dec(nn_dec, flags, ovr_en);
    @(negedge clk) strb_in = 1;
    @(negedge clk);
    check("RNA_DEC", rna_dec, e);
    check("STRB", strb, 1);
    nn_dec = ~nn_dec; flags = ~flags;
    @(negedge clk) strb_in = 0;
    @(negedge clk);
    check("RNA_DEC held", rna_dec, e);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int npos = 0;
  always @(posedge rna_dec) npos++;

  initial begin
    mode = '0; obb = '0; flags = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    mode.loaded = 1; mode.work = 1;
    for (int t = 0; t < 1000; t++) event_once(1'b0);
    wr(0, 1);
    for (int t = 0; t < 1000; t++) event_once(1'b1);
    check("some positive decisions", npos > 50, 1);
    // TEST_OVRALL: NN decisions come from register 1
    mode = '0; mode.test_ovrall = 1;
    wr(0, 0);
    for (int t = 0; t < 50; t++) begin
      logic [3:0] tn;
      logic e;
      tn = 4'($urandom);
      wr(1, {12'd0, tn});
      nn_dec = ~tn;
      flags  = rand_flags();
      e = ref_dec(tn, flags, 1'b0);
      @(negedge clk) strb_in = 1;
      @(negedge clk) strb_in = 0;
      check("TEST_OVRALL", rna_dec, e);
    end
    // TEST_DU: inputs from registers, logic outputs read back, pins driven
    mode = '0; mode.test_du = 1;
    for (int t = 0; t < 50; t++) begin
      logic [15:0] ti;
      logic [2:0] to;
      du_flags_t f;
      ti = 16'($urandom); to = 3'($urandom);
      wr(2, ti); wr(3, {13'd0, to});
      f.vl_1p_ava = ti[4]; f.vl_2p_ava = ti[5]; f.vr_1p_ava = ti[6]; f.vr_2p_ava = ti[7];
      f.vl_empty = ti[8]; f.vr_empty = ti[9]; f.scifi_empty = ti[10];
      f.vl_ovr = ti[11]; f.vr_ovr = ti[12]; f.scifi_ovr = ti[13];
      f.min_dist15 = ti[14]; f.ll_single_hit = ti[15]; f.single_hit = to[0];
      @(negedge clk) obb.addr = 3'd4;
      #0.5;
      check("TEST_DU logic", obb_rdata[5], ref_dec(ti[3:0], f, 1'b0));
      check("TEST_DU empty", obb_rdata[0], f.vl_empty | f.vr_empty | f.scifi_empty);
      check("TEST_DU pin", rna_dec, to[1]);
      check("TEST_DU strb", strb, to[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
