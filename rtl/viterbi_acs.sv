// viterbi_acs: add-compare-select unit and path metric registers.
//
// For every state s' the two predecessor states p_b = {b, s'[1]} (b = 0, 1)
// are examined: candidate metric pm[p_b] + bm[subset(p_b -> s')], with subset
// {X1N ^ X1N_2, X1N_1} = {s'[0] ^ b, s'[1]}. The smaller candidate survives
// (a tie keeps b = 0). The decision word of s' records b and the uncoded bit
// Y2N of the surviving parallel branch, and goes to the trace-back memory.
//
// Normalisation: the minimum of the current path metrics is subtracted from
// every new metric, so the metrics stay small and never wrap (they stay below
// 2*7 + 7 + RESET_PM after any number of steps). After reset S0 holds metric 0
// and the other states RESET_PM, because the encoder starts in S0.
//
// Timing: dec_col is the combinational decision column of the step being
// computed; the trace-back memory stores it on the same rising edge (in_valid
// high) that registers the new path metrics, so both stay aligned. best_state is the state with the smallest
// registered metric (lowest index on ties), the start of the trace-back.
// Reset is active high and asynchronous. Metric width, normalisation and reset
// values are this design's choices.
module viterbi_acs
  import viterbi_pkg::*;
#(
  parameter int unsigned PM_W     = 6,
  parameter int unsigned RESET_PM = 15
) (
  input  logic                         clk,
  input  logic                         res,
  input  logic                         in_valid,
  input  dist_t    [NUM_SUBSETS-1:0]   bm,
  input  logic     [NUM_SUBSETS-1:0]   x2_sel,
  output dec_col_t                     dec_col,     // decisions of this step
  output logic     [NUM_STATES-1:0][PM_W-1:0] pm,   // registered path metrics
  output state_t                       best_state
);

  logic     [NUM_STATES-1:0][PM_W-1:0] pm_next;
  logic     [PM_W-1:0]                 pm_min;

  // Smallest current metric and its state.
  always_comb begin
    pm_min     = pm[0];
    best_state = state_t'(0);
    for (int s = 1; s < NUM_STATES; s++) begin
      if (pm[s] < pm_min) begin
        pm_min     = pm[s];
        best_state = state_t'(s);
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NUM_STATES; s++) begin
      state_t           sn, p0, p1;
      subset_t          sub0, sub1;
      logic [PM_W-1:0]  c0, c1;
      sn   = state_t'(s);
      p0   = pred_state(sn[1], 1'b0);
      p1   = pred_state(sn[1], 1'b1);
      sub0 = branch_subset(p0, sn[0]);
      sub1 = branch_subset(p1, sn[0]);
      c0   = pm[p0] + PM_W'(bm[sub0]);
      c1   = pm[p1] + PM_W'(bm[sub1]);
      if (c1 < c0) begin
        pm_next[s]       = c1 - pm_min;
        dec_col[s].pred = 1'b1;
        dec_col[s].x2   = x2_sel[sub1];
      end else begin
        pm_next[s]       = c0 - pm_min;
        dec_col[s].pred = 1'b0;
        dec_col[s].x2   = x2_sel[sub0];
      end
    end
  end

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      for (int s = 0; s < NUM_STATES; s++)
        pm[s] <= (s == 0) ? '0 : PM_W'(RESET_PM);
    end else if (in_valid) begin
      pm <= pm_next;
    end
  end

endmodule
