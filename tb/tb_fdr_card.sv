// tb_fdr_card: self-checking test of the Fanout / Delay / Register card.
// Short hit pulses are applied at known times; the gate is opened at a known
// time after the programmed delay. Checks the fanout copy, that a hit whose
// delayed pulse falls inside the gate is registered and one outside it is
// not, the delay to within one 5 ns step for several BCD settings, the
// duplicated low 16 outputs and that the map is held after the gate.
module tb_fdr_card;
  import rna_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [63:0] scifi_in = '0;
  logic        scifi_gate = 0;
  logic [3:0]  bcd_tens = 0, bcd_units = 0;
  logic [63:0] scifi_fanout, hits_q;
  logic [15:0] hits_dup_q;
  int checks = 0, failures = 0;

  fdr_card dut (.*);

  always #1 clk = ~clk;  // one tick = 2 time units

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic ticks(int n); repeat (n) @(posedge clk); endtask

  // Put pattern p on the inputs for 'width' ticks starting now, then open the
  // gate 'gate_at' ticks later for 'gate_w' ticks; return the registered map.
  task automatic shot(logic [63:0] p, int width, int gate_at, int gate_w, output logic [63:0] got);
    @(negedge clk);
    scifi_in = p;
    #1 check("fanout", scifi_fanout, p);
    fork
      begin ticks(width); @(negedge clk); scifi_in = '0; end
      begin ticks(gate_at); @(negedge clk); scifi_gate = 1; ticks(gate_w); @(negedge clk); scifi_gate = 0; end
    join
    ticks(50);
    got = hits_q;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] got, p;
    int d;
    ticks(3); rst_n = 1; ticks(3);
    // delay settings: 0, 7, 30, 99 steps
    for (int s = 0; s < 4; s++) begin
      d = (s == 0) ? 0 : (s == 1) ? 7 : (s == 2) ? 30 : 99;
      bcd_tens = 4'(d / 10); bcd_units = 4'(d % 10);
      ticks(1100);  // flush the pipeline
      p = {$urandom, $urandom} | 64'h1;
      // 40-tick pulse; gate of 20 ticks well inside the delayed pulse
      shot(p, 40, d*10 + 15, 10, got);
      check("inside gate", got, p);
      check("duplicate", {48'd0, hits_dup_q}, {48'd0, p[15:0]});
      // gate that closes before the delayed pulse arrives: nothing registered
      if (d >= 3) begin
        shot(~p, 40, d*10 - 25, 10, got);
        check("before gate", got, '0);
      end
      // gate that opens after the delayed pulse has passed
      shot(p, 20, d*10 + 45, 10, got);
      check("after gate", got, '0);
    end
    // two short pulses at different times inside one gate are both collected
    bcd_tens = 0; bcd_units = 5; ticks(1100);
    fork
      begin @(negedge clk); scifi_in = 64'h1; ticks(12); @(negedge clk); scifi_in = 0;
            ticks(20); @(negedge clk); scifi_in = 64'h8000_0000_0000_0000; ticks(12); @(negedge clk); scifi_in = 0; end
      begin ticks(45); @(negedge clk); scifi_gate = 1; ticks(60); @(negedge clk); scifi_gate = 0; end
    join
    ticks(30);
    check("collect", hits_q, 64'h8000_0000_0000_0001);
    ticks(200);
    check("hold", hits_q, 64'h8000_0000_0000_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
