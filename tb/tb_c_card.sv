// tb_c_card: self-checking test of the Concentrator card. Random sparse and
// dense 80-bit hit-maps plus hand-made corner cases (no hit, one hit, pair at
// distance 14 and 15, hit only in the overlap, more than 15 hits) are
// compared with a reference that searches all hit pairs. Checks MIN_DIST,
// HITS, both positions (absolute, 1-based) and the bus enable.
module tb_c_card;
  import rna_pkg::*;

  logic [79:0] hitmap;
  logic [1:0]  card_idx;
  logic        sel;
  logic [3:0]  min_dist, hits;
  logic [7:0]  pos1, pos2;
  logic        pos_oe;
  int checks = 0, failures = 0;

  c_card dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (map %h card %0d)", what, got, exp, hitmap, card_idx);
    end
  endtask

  task automatic run_case();
    int n, nl, bd, bi, first, e1, e2, base;
    n = 0; nl = 0; bd = 1000; bi = -1; first = -1;
    for (int i = 0; i < 80; i++) if (hitmap[i]) begin
      n++;
      if (i < 64) nl++;
      if (first < 0) first = i;
      for (int j = i + 1; j < 80; j++) if (hitmap[j]) begin
        if (j - i < bd) begin bd = j - i; bi = i; end
      end
    end
    base = card_idx * 64 + 1;
    #1;
    if (n == 0)        begin check("dist", min_dist, 15); e1 = 0; e2 = 0; end
    else if (n == 1)   begin check("dist", min_dist, 0);  e1 = base + first; e2 = e1; end
    else if (bd >= 15) begin check("dist", min_dist, 15); e1 = 0; e2 = 0; end
    else               begin check("dist", min_dist, bd); e1 = base + bi; e2 = base + bi + bd; end
    check("hits", hits, nl > 15 ? 15 : nl);
    check("pos1", pos1, e1);
    check("pos2", pos2, e2);
    check("oe", pos_oe, sel);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    card_idx = 0; sel = 0;
    hitmap = '0;                         run_case();
    hitmap = 80'h1 << 70;                run_case();  // single hit in overlap
    hitmap = (80'h1 << 3) | (80'h1 << 17); run_case(); // distance 14
    hitmap = (80'h1 << 3) | (80'h1 << 18); run_case(); // distance 15
    hitmap = (80'h1 << 10) | (80'h1 << 11) | (80'h1 << 40) | (80'h1 << 41); run_case(); // tie
    hitmap = {16'hFFFF, 64'h0000_FFFF_FFFF_0000}; run_case(); // > 15 hits
    card_idx = 3; sel = 1;
    hitmap = (80'h1 << 47) | (80'h1 << 45); run_case(); // column 240 and 238
    for (int t = 0; t < 3000; t++) begin
      card_idx = 2'($urandom_range(0, 3));
      sel = 1'($urandom_range(0, 1));
      hitmap = '0;
      case (t % 4)
        0: ;
        1: hitmap[$urandom_range(0, 79)] = 1'b1;
        2: for (int k = 0; k < $urandom_range(2, 6); k++) hitmap[$urandom_range(0, 79)] = 1'b1;
        default: for (int k = 0; k < $urandom_range(5, 30); k++) hitmap[$urandom_range(0, 79)] = 1'b1;
      endcase
      // C-CARD #4 sees only the 48 used columns of FDR-CARD #4
      if (card_idx == 3) hitmap[79:48] = '0;
      run_case();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
