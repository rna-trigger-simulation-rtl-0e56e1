// tb_timing_unit: self-checking test of the Timing-Unit. Programs V_DELAY,
// SciFi_DELAY and SciFi_GATE PW over the on-board bus, runs sequences for
// several register / jumper / switch settings and measures, in 0.5 ns ticks
// from the rising edge of BUSY: the V_CLK strobe, the gate edges, NN_CLK (the
// NN delay after the later of V_CLK and gate end), STRB (STRB delay after
// NN_CLK), the 20 ns STRB width and the fall of BUSY at the end of STRB.
// Also checks that START is ignored while busy, under VETO and outside
// WORK, the single-shot READY/NEXT handshake, the watchdog (shortened) and
// the TEST_TU start and NN_CLK bits.
module tb_timing_unit;
  import rna_pkg::*;

  localparam int WD = 3000;
  logic        clk = 0, rst_n = 0;
  mmode_t      mode;
  logic        start = 0, veto = 0;
  logic [4:0]  nn_delay_sel = 0;
  logic [7:0]  strb_delay_sel = 0;
  obb_req_t    obb;
  logic [15:0] obb_rdata;
  logic        busy, ready, v_clk, scifi_gate, nn_clk, strb;
  int checks = 0, failures = 0;
  int unsigned tick = 0;
  int unsigned t_busy, t_vclk, t_gon, t_goff, t_nn, t_son, t_soff, t_bfall, n_vclk;

  timing_unit #(.WDOG_TICKS(WD)) dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) tick <= tick + 1;

  // edge recorder
  logic busy_d, gate_d, nn_d, strb_d;
  always @(posedge clk) begin
    busy_d <= busy; gate_d <= scifi_gate; nn_d <= nn_clk; strb_d <= strb;
    if (busy && !busy_d) begin t_busy <= tick; n_vclk <= 0; end
    if (!busy && busy_d) t_bfall <= tick;
    if (v_clk) begin t_vclk <= tick; n_vclk <= n_vclk + 1; end
    if (scifi_gate && !gate_d) t_gon <= tick;
    if (!scifi_gate && gate_d) t_goff <= tick;
    if (nn_clk && !nn_d) t_nn <= tick;
    if (strb && !strb_d) t_son <= tick;
    if (!strb && strb_d) t_soff <= tick;
  end

  task automatic check(string what, int got, int exp, int tol = 0);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [15:0] d);
    @(negedge clk);
    obb.cs = 4'b0001; obb.addr = a; obb.wdata = d; obb.wr = 1;
    @(negedge clk);
    obb.wr = 0;
  endtask

  task automatic pulse_start();
    @(negedge clk) start = 1;
    repeat (10) @(negedge clk);
    start = 0;
  endtask

  task automatic run_seq(int v, int s, int pw, int nsel, int ssel);
    int vd, sd, gw, later;
    wr(1, 16'(v)); wr(2, 16'(s)); wr(3, 16'(pw));
    nn_delay_sel = 5'(nsel); strb_delay_sel = 8'(ssel);
    pulse_start();
    wait (busy == 0);
    repeat (3) @(posedge clk);
    vd = 25 + v; sd = 25 + s; gw = 25 + pw;
    check("V_CLK delay", int'(t_vclk - t_busy), vd, 1);
    check("V_CLK once", n_vclk, 1);
    check("gate delay", int'(t_gon - t_busy), sd, 1);
    check("gate width", int'(t_goff - t_gon), gw);
    later = (t_vclk + 1 > t_goff) ? int'(t_vclk + 1) : int'(t_goff);
    check("NN delay", int'(t_nn - later), 12 * (nsel + 1), 2);
    check("STRB delay", int'(t_son - t_nn), 2 * (30 + ssel));
    check("STRB width", int'(t_soff - t_son), 40);
    check("BUSY end", int'(t_bfall - t_soff), 0, 1);
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    mode = '0; obb = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // not enabled: START ignored
    pulse_start(); repeat (20) @(negedge clk);
    check("idle without WORK", busy, 0);
    mode.loaded = 1; mode.work = 1;
    run_seq(0, 0, 55, 0, 0);
    run_seq(30, 10, 55, 3, 20);
    run_seq(255, 0, 0, 19, 255);     // V_CLK after the gate
    run_seq(5, 200, 255, 7, 100);
    // VETO suppresses START
    veto = 1; pulse_start(); repeat (20) @(negedge clk);
    check("veto", busy, 0);
    veto = 0;
    // START during BUSY ignored: one sequence only
    wr(1, 0); wr(2, 0); wr(3, 0);
    pulse_start();
    repeat (30) @(negedge clk);
    pulse_start();
    t0 = t_busy;
    wait (busy == 0); repeat (5) @(negedge clk);
    check("second START ignored", int'(t_busy), t0);
    check("no restart", busy, 0);
    // single shot: READY, BUSY held, START ignored until NEXT
    mode.single_shot = 1;
    pulse_start();
    wait (ready == 1);
    check("ready busy", busy, 1);
    pulse_start(); repeat (20) @(negedge clk);
    check("ready holds", ready, 1);
    wr(4, 16'h0001);
    repeat (3) @(negedge clk);
    check("next releases", busy, 0);
    // watchdog: a single-shot wait without NEXT ends after WD ticks
    pulse_start();
    wait (ready == 1);
    t0 = tick;
    wait (busy == 0);
    repeat (3) @(posedge clk);
    check("watchdog", int'(t_bfall - t_busy), WD, 2);
    mode.single_shot = 0;
    // TEST_TU: test start bit and test NN clock
    mode = '0; mode.test_tu = 1;
    wr(4, 16'h0002);
    repeat (5) @(negedge clk);
    check("T_START", busy, 1);
    wait (busy == 0);
    wr(4, 16'h0004);
    check("T_NN_CLK", nn_clk, 1);
    wr(4, 16'h0000);
    check("T_NN_CLK off", nn_clk, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
