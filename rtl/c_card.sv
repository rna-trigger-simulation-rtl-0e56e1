// c_card: Concentrator card. Looks at an 80-column window of the SciFi
// hit-map: the 64 columns of its own FDR-CARD plus the lowest 16 columns of
// the next one, so that a close pair straddling two FDR-CARDs is never lost.
//
// Three results, all combinational from the registered hit-map:
//  * min_dist: distance of the two closest hits in the 80-bit window.
//    Adjacent columns give 1; exact up to 14; 15 means "15 or more, or no hit
//    at all"; a single hit in the window gives 0.
//  * hits: number of hits in the lower 64 columns only (so every hit is
//    counted by exactly one card), saturating at 15.
//  * pos1/pos2: absolute 8-bit positions of the closest pair (pos1 the lower
//    one), driven onto the shared position bus only while sel is high
//    (pos_oe). A single hit gives the same position twice. The absolute
//    position is card_idx*64 + column + 1, so SciFi columns are numbered
//    1..240 as in the detector labels.
//
// Follows the description: window size, overlap, distance coding and
// saturation, hit counting on 64 columns, single-hit duplication, select.
// Own choices: when several pairs share the minimum distance the lowest one
// is reported; when no pair is closer than 15 the positions are 0; the card
// learns its index from a 2-bit input (the hardware derives it from the card's
// VME address); the three-state bus is modelled as a value plus an enable
// that the backplane combines.
module c_card
  import rna_pkg::*;
#(
  parameter int unsigned W      = CCARD_W,  // window width
  parameter int unsigned COUNT_W = FDR_CH,   // counted part of the window
  parameter int unsigned MAXD   = 15        // saturation value of min_dist
) (
  input  logic [W-1:0]        hitmap,    // registered SciFi columns
  input  logic [1:0]          card_idx,  // 0 for C-CARD #1 ... 3 for #4
  input  logic                sel,       // from the M-CARD
  output logic [3:0]          min_dist,
  output logic [3:0]          hits,
  output logic [SPOS_W-1:0]   pos1,
  output logic [SPOS_W-1:0]   pos2,
  output logic                pos_oe
);

  logic [7:0]  n_all;     // hits in the whole window
  logic [7:0]  n_low;     // hits in the counted part
  logic [3:0]  best_d;
  logic [6:0]  best_i;
  logic [6:0]  first_i;
  logic        found;

  always_comb begin
    n_all = '0;
    n_low = '0;
    for (int i = 0; i < W; i++) begin
      n_all = n_all + 8'(hitmap[i]);
      if (i < COUNT_W) n_low = n_low + 8'(hitmap[i]);
    end
  end

  // closest pair: scan every hit for its next hit within MAXD-1 columns
  always_comb begin
    best_d  = 4'(MAXD);
    best_i  = '0;
    first_i = '0;
    found   = 1'b0;
    for (int i = W-1; i >= 0; i--) begin
      if (hitmap[i]) first_i = 7'(i);
    end
    for (int i = W-1; i >= 0; i--) begin
      if (hitmap[i]) begin
        for (int k = MAXD-1; k >= 1; k--) begin
          if (i + k < W && hitmap[i+k] && 4'(k) <= best_d) begin
            best_d = 4'(k);
            best_i = 7'(i);
            found  = 1'b1;
          end
        end
      end
    end
  end

  logic [SPOS_W-1:0] base;
  assign base = SPOS_W'(card_idx) * SPOS_W'(FDR_CH) + 1'b1;

  always_comb begin
    hits   = (n_low > 8'd15) ? 4'd15 : n_low[3:0];
    pos1   = '0;
    pos2   = '0;
    if (n_all == 8'd1) begin
      min_dist = 4'd0;
      pos1     = base + SPOS_W'(first_i);
      pos2     = pos1;
    end else if (found) begin
      min_dist = best_d;
      pos1     = base + SPOS_W'(best_i);
      pos2     = base + SPOS_W'(best_i) + SPOS_W'(best_d);
    end else begin
      min_dist = 4'(MAXD);
    end
  end

  assign pos_oe = sel;

endmodule
