// tb_vme_interface: self-checking test of the VMEbus INTERFACE. A bus
// master task runs VMEbus cycles against the interface. Checks: DTACK on
// double-byte accesses, BERR on single-, triple- and quad-byte accesses, no
// answer for another card number, a wrong address modifier or A15..A10 not
// zero; writes reach the right chip and register on the on-board bus; reads
// return the addressed chip register; the M-Mode safety rules (LOADED not
// with a TEST mode, WORK only with LOADED, writes dropped while LOADED except
// the TU NEXT register, TEST modes inhibited while LOADED), M-Status, SYSFAIL
// and the three reset sources.
module tb_vme_interface;
  import rna_pkg::*;

  localparam logic [3:0] CARD = 4'hA;
  logic        clk = 0, vcc_ok = 0, sys_reset_n = 1;
  logic [3:0]  card_no = CARD;
  logic        as_n = 1, lword_n = 1, write_n = 1;
  logic [1:0]  ds_n = 2'b11;
  logic [5:0]  am = 6'h29;
  logic [15:1] a = '0;
  logic [15:0] d_in = '0, d_out;
  logic        d_oe, dtack_n, berr_n, sysfail_n;
  logic [3:0]  nn_loaded = 4'hF;
  logic        busy = 0, ready = 0;
  logic [15:0] chip_rdata [4];
  obb_req_t    obb;
  mmode_t      mode;
  logic        unit_rst_n, led_test;
  int checks = 0, failures = 0;

  // captured on-board-bus writes
  obb_req_t    last_wr;
  int          n_wr = 0;

  vme_interface dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) if (obb.wr) begin last_wr <= obb; n_wr <= n_wr + 1; end
  always_comb for (int c = 0; c < 4; c++) chip_rdata[c] = {4'(c), 9'h0A5, obb.addr};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one VMEbus cycle; resp: 1 = DTACK, 2 = BERR, 0 = no answer within 40 ticks
  task automatic cycle(bit wr, logic [15:1] addr, logic [15:0] wd, logic [1:0] ds,
                       logic lw, logic [5:0] amod, output int resp, output logic [15:0] rd);
    int n;
    @(negedge clk);
    a = addr; am = amod; write_n = !wr; lword_n = lw; d_in = wd; as_n = 0;
    @(negedge clk) ds_n = ds;
    resp = 0; rd = '0; n = 0;
    while (dtack_n && berr_n && n < 40) begin @(negedge clk); n++; end
    if (!dtack_n) begin resp = 1; rd = d_out; end
    else if (!berr_n) resp = 2;
    as_n = 1; ds_n = 2'b11;
    repeat (2) @(negedge clk);
  endtask

  function automatic logic [15:1] adr(logic [1:0] chip, logic [2:0] r);
    return {6'd0, CARD, chip, r};
  endfunction

  task automatic vwr(logic [15:1] ad, logic [15:0] d, int exp_resp = 1);
    int r; logic [15:0] x;
    cycle(1, ad, d, 2'b00, 1'b1, 6'h2D, r, x);
    check("write response", r, exp_resp);
  endtask

  task automatic vrd(logic [15:1] ad, output logic [15:0] d);
    int r;
    cycle(0, ad, '0, 2'b00, 1'b1, 6'h29, r, d);
    check("read response", r, 1);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, w0;
    logic [15:0] d;
    repeat (3) @(negedge clk); vcc_ok = 1;
    wait (unit_rst_n == 1);
    // ---- access widths and decoding ----
    cycle(1, adr(1, 2), 16'h1234, 2'b00, 1'b1, 6'h29, r, d); check("D16 dtack", r, 1);
    check("obb cs", last_wr.cs, 4'b0010);
    check("obb addr", last_wr.addr, 2);
    check("obb data", last_wr.wdata, 16'h1234);
    cycle(1, adr(1, 2), 16'h1, 2'b10, 1'b1, 6'h29, r, d); check("single byte berr", r, 2);
    cycle(1, adr(1, 2), 16'h1, 2'b00, 1'b0, 6'h29, r, d); check("quad byte berr", r, 2);
    cycle(1, adr(1, 2), 16'h1, 2'b01, 1'b0, 6'h29, r, d); check("triple byte berr", r, 2);
    w0 = n_wr;
    cycle(1, {6'd0, 4'h3, 2'd1, 3'd2}, 16'h1, 2'b00, 1'b1, 6'h29, r, d); check("other card", r, 0);
    cycle(1, adr(1, 2), 16'h1, 2'b00, 1'b1, 6'h39, r, d);                check("wrong AM", r, 0);
    cycle(1, adr(1, 2) | 15'h4000, 16'h1, 2'b00, 1'b1, 6'h29, r, d);     check("A15 set", r, 0);
    check("no stray writes", n_wr, w0);
    // ---- reads ----
    for (int c = 0; c < 4; c++) for (int k = 1; k < 8; k++) begin
      vrd(adr(2'(c), 3'(k)), d);
      check("read data", d, {4'(c), 9'h0A5, 3'(k)});
    end
    // ---- mode register and safety logic ----
    vwr(adr(0, 0), 16'h0013);          // LOADED + WORK + TEST_OVRALL -> only TEST_OVRALL
    check("loaded refused with test", mode.loaded, 0);
    check("work needs loaded", mode.work, 0);
    check("test set", mode.test_ovrall, 1);
    check("TEST led", led_test, 1);
    vwr(adr(0, 0), 16'h0008);          // LOAD_SRAM
    check("load_sram", mode.load_sram, 1);
    w0 = n_wr;
    vwr(adr(1, 0), 16'h5555);
    check("write allowed when not loaded", n_wr, w0 + 1);
    vwr(adr(0, 0), 16'h0003);          // LOADED + WORK
    check("loaded", mode.loaded, 1);
    check("work", mode.work, 1);
    check("load cleared", mode.load_sram, 0);
    vrd(adr(0, 0), d);
    check("status mode", d[9:0], 10'h003);
    check("status sysfail", d[11], 0);
    check("sysfail released", sysfail_n, 1);
    nn_loaded = 4'b1011;
    #4 check("sysfail from NN-CARD", sysfail_n, 0);
    nn_loaded = 4'hF;
    w0 = n_wr;
    vwr(adr(1, 0), 16'h5555);          // dropped
    vwr(adr(3, 2), 16'h5555);          // dropped
    check("writes dropped while loaded", n_wr, w0);
    vwr(adr(0, 4), 16'h0001);          // TU NEXT allowed
    check("NEXT allowed", n_wr, w0 + 1);
    check("NEXT chip", last_wr.cs, 4'b0001);
    vwr(adr(0, 0), 16'h0207);          // TEST_DU inhibited while loaded
    check("test inhibited", mode.test_du, 0);
    check("single shot", mode.single_shot, 1);
    busy = 1; ready = 1;
    vrd(adr(0, 0), d);
    check("status busy/ready", d[13:12], 2'b11);
    busy = 0; ready = 0;
    // ---- resets ----
    vwr(adr(0, 0), 16'h8000);          // RESET bit
    check("reset bit asserts reset", unit_rst_n, 0);
    wait (unit_rst_n == 1);
    check("loaded cleared by reset", mode.loaded, 0);
    check("sysfail after reset", sysfail_n, 0);
    vwr(adr(0, 0), 16'h0001);
    check("loaded again", mode.loaded, 1);
    @(negedge clk) sys_reset_n = 0;
    @(negedge clk) check("SYSRESET", unit_rst_n, 0);
    check("SYSRESET clears", mode.loaded, 0);
    sys_reset_n = 1;
    wait (unit_rst_n == 1);
    vwr(adr(0, 0), 16'h0001);
    @(negedge clk) vcc_ok = 0;
    @(negedge clk) check("supply low", unit_rst_n, 0);
    check("supply low clears", mode.loaded, 0);
    vcc_ok = 1;
    wait (unit_rst_n == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
