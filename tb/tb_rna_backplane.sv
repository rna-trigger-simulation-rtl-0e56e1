// tb_rna_backplane: self-checking test of the backplane wiring. Random FDR
// outputs must appear in the right C-CARD windows (own 64 columns plus the
// next card's lowest 16, zero above C-CARD #4); the enabled C-CARD must drive
// the position bus; each NN-PATTERN must carry the right hodoscope pair with
// every field MSB first (bit 0 = MSB of SciFi_POS1).
module tb_rna_backplane;
  import rna_pkg::*;

  logic [63:0] fdr_hits [4];
  logic [15:0] fdr_dup  [4];
  logic [79:0] cc_window [4];
  logic [7:0]  cc_pos1 [4], cc_pos2 [4];
  logic [3:0]  cc_pos_oe;
  logic [7:0]  scifi_pos1, scifi_pos2;
  logic [4:0]  vl_1p, vl_2p, vr_1p, vr_2p;
  logic [25:0] nn_pat [4];
  int checks = 0, failures = 0;

  rna_backplane dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // read a field back from a pattern, MSB at the lowest bit number
  function automatic int field(logic [25:0] p, int lo, int w);
    int v;
    v = 0;
    for (int i = 0; i < w; i++) v = (v << 1) | p[lo + i];
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 4; k++) begin
        fdr_hits[k] = {$urandom, $urandom};
        fdr_dup[k]  = fdr_hits[k][15:0];
        cc_pos1[k]  = 8'($urandom);
        cc_pos2[k]  = 8'($urandom);
      end
      s = $urandom_range(0, 4);
      cc_pos_oe = (s == 4) ? 4'b0 : 4'(1 << s);
      {vl_1p, vl_2p, vr_1p, vr_2p} = 20'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        check("window low", cc_window[k][63:0], fdr_hits[k]);
        check("window overlap", cc_window[k][79:64], fdr_hits[k+1][15:0]);
      end
      check("window 4", cc_window[3], {16'd0, fdr_hits[3]});
      check("bus pos1", scifi_pos1, (s == 4) ? 0 : cc_pos1[s]);
      check("bus pos2", scifi_pos2, (s == 4) ? 0 : cc_pos2[s]);
      for (int k = 0; k < 4; k++) begin
        check("pat pos1", field(nn_pat[k], 0, 8), scifi_pos1);
        check("pat pos2", field(nn_pat[k], 8, 8), scifi_pos2);
        check("pat VL", field(nn_pat[k], 16, 5), (k < 2) ? vl_1p : vl_2p);
        check("pat VR", field(nn_pat[k], 21, 5), (k % 2 == 0) ? vr_1p : vr_2p);
      end
    end
    // bit 0 is the MSB of SciFi_POS1
    cc_pos_oe = 4'b0001; cc_pos1[0] = 8'h80; cc_pos2[0] = 8'h00;
    #1 check("MSB first", nn_pat[0][0], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
