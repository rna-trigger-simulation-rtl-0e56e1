// fdr_card: Fanout / Delay / Register card for 64 SciFi columns.
//
// The SciFi signals arrive before the lowest-level trigger, so each card
// (1) fans the inputs out unchanged for other users, (2) delays them in a
// pipeline that advances every STEP_TICKS clock ticks (5 ns at the 0.5 ns
// tick), with the number of steps set by two BCD front-panel selectors
// (tens and units, 0..99 steps), and (3) registers the delayed hit-map while
// SciFi_GATE is high. The register is cleared on the rising edge of the gate
// and then collects (ORs) every hit seen while the gate stays open, so a
// column is "hit" if it fired anywhere inside the gate window; after the gate
// falls the map is held until the next gate. The lowest 16 registered
// outputs are also driven on a second, separately buffered port, because
// they feed two C-CARDs.
//
// Follows the description: 64 inputs, 5 ns delay steps, two BCD selectors,
// registration during the gate, duplicated lowest 16 outputs. Own choices:
// the OR-collection inside the gate, clearing at the gate's rising edge,
// and an invalid BCD digit (A..F) being read as 9.
//
// Timing: fanout is combinational; the delayed map lags scifi_in by
// delay*STEP_TICKS ticks (to within one step); hits_q follows the gate by
// one tick.
module fdr_card
  import rna_pkg::*;
#(
  parameter int unsigned CH         = FDR_CH,
  parameter int unsigned STEP_TICKS = 10,  // 5 ns / 0.5 ns
  parameter int unsigned MAX_STEPS  = 99   // two BCD digits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CH-1:0] scifi_in,      // discriminated detector signals
  input  logic          scifi_gate,    // from the M-CARD
  input  logic [3:0]    bcd_tens,      // delay selector, tens of steps
  input  logic [3:0]    bcd_units,     // delay selector, units of steps
  output logic [CH-1:0] scifi_fanout,  // copy of the inputs
  output logic [CH-1:0] hits_q,        // registered hit-map to the C-CARDs
  output logic [15:0]   hits_dup_q     // second copy of hits_q[15:0]
);

  localparam int unsigned SW = (STEP_TICKS > 1) ? $clog2(STEP_TICKS) : 1;

  logic [SW-1:0]   step_cnt;
  logic            step;
  logic [CH-1:0]   pipe [MAX_STEPS+1];  // pipe[0] = sampled input
  logic [6:0]      delay_steps;
  logic [CH-1:0]   delayed;
  logic            gate_d;

  assign scifi_fanout = scifi_in;

  always_comb begin
    int unsigned t, u;
    t = (bcd_tens  > 4'd9) ? 9 : int'(bcd_tens);
    u = (bcd_units > 4'd9) ? 9 : int'(bcd_units);
    delay_steps = 7'(t*10 + u);
    if (delay_steps > 7'(MAX_STEPS)) delay_steps = 7'(MAX_STEPS);
  end

  assign step = (step_cnt == SW'(STEP_TICKS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_cnt <= '0;
    else        step_cnt <= step ? '0 : step_cnt + 1'b1;
  end

  // delay pipeline: sampled every step
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= MAX_STEPS; i++) pipe[i] <= '0;
    end else if (step) begin
      pipe[0] <= scifi_in;
      for (int i = 1; i <= MAX_STEPS; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign delayed = (delay_steps == 0) ? scifi_in : pipe[delay_steps-1];

  // gate register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_d <= 1'b0;
      hits_q <= '0;
    end else begin
      gate_d <= scifi_gate;
      if (scifi_gate && !gate_d) hits_q <= delayed;
      else if (scifi_gate)       hits_q <= hits_q | delayed;
    end
  end

  assign hits_dup_q = hits_q[15:0];

endmodule
