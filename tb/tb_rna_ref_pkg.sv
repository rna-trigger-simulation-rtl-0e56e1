// tb_rna_ref_pkg: reference functions shared by the RNA trigger testbenches.
// They give the look-up-table contents the board is loaded with (worked out
// from the meaning of each table, not from the RTL) and a reference for the
// final decision.
package tb_rna_ref_pkg;

  // Pattern-Unit LUT word for an 18-bit hodoscope hit-map: positions are the
  // slab numbers 1..18, 1P the lower, 2P the higher; a single hit fills 1P
  // only; EMPTY for no hit, OVR for more than two.
  function automatic logic [15:0] vlut_word(logic [17:0] p);
    int n, a, b;
    logic [15:0] w;
    n = 0; a = 0; b = 0;
    for (int i = 0; i < 18; i++) if (p[i]) begin
      n++;
      if (n == 1) a = i + 1;
      if (n == 2) b = i + 1;
    end
    w = '0;
    if (n == 0)      w[10] = 1'b1;
    else if (n > 2)  w[11] = 1'b1;
    else begin
      w[4:0] = 5'(a);
      w[12]  = 1'b1;
      if (n == 2) begin w[9:5] = 5'(b); w[13] = 1'b1; end
    end
    return w;
  endfunction

  // MIND-LUT word for distances {d4,d3,d2,d1}: choose the smallest distance
  // in 1..14, else a 0 (single hit), else 15; ties to the lowest card.
  function automatic logic [3:0] mind_word(logic [15:0] d);
    int best, rank, r;
    logic all15, all0or15, any0;
    best = 0; rank = 99; all15 = 1; all0or15 = 1; any0 = 0;
    for (int k = 0; k < 4; k++) begin
      int dk;
      dk = int'(d[4*k +: 4]);
      r = (dk == 0) ? 15 : (dk == 15) ? 16 : dk;
      if (r < rank) begin rank = r; best = k; end
      if (dk != 15) all15 = 0;
      if (dk != 0 && dk != 15) all0or15 = 0;
      if (dk == 0) any0 = 1;
    end
    return {all0or15 && any0, all15, 2'(best)};
  endfunction

  // HITS-LUT word for counts {h4,h3,h2,h1}: {spare, OVR(>5), SINGLE(==1), EMPTY(==0)}
  function automatic logic [3:0] hits_word(logic [15:0] h);
    int s;
    s = 0;
    for (int k = 0; k < 4; k++) s += int'(h[4*k +: 4]);
    return {1'b0, s > 5, s == 1, s == 0};
  endfunction

  // Field of an NN-PATTERN, stored MSB first from bit 'lo'.
  function automatic int pat_field(logic [25:0] p, int lo, int w);
    int v;
    v = 0;
    for (int i = 0; i < w; i++) v = (v << 1) | int'(p[lo + i]);
    return v;
  endfunction

  // Rule of the NN-CARD stand-in (see nn_card_model).
  function automatic logic nn_rule_fields(int p1, int p2, int vl, int vr);
    int ds, dv;
    ds = (p2 > p1) ? p2 - p1 : p1 - p2;
    dv = (vl > vr) ? vl - vr : vr - vl;
    return (ds <= 8) && (dv <= 6) && (vl != 0) && (vr != 0);
  endfunction

  function automatic logic nn_rule(logic [25:0] p);
    return nn_rule_fields(pat_field(p, 0, 8), pat_field(p, 8, 8),
                          pat_field(p, 16, 5), pat_field(p, 21, 5));
  endfunction

endpackage
