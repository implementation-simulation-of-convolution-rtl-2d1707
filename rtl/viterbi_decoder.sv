// viterbi_decoder: 4-state Viterbi decoder for the rate-2/3, constraint-
// length-3 code with 8-PSK signalling.
//
// Datapath, one received symbol per in_valid cycle:
//   pt_dist[0..7] -> viterbi_bmu (best parallel branch per subset, 4 metrics)
//              -> viterbi_acs (add-compare-select, path metrics, decisions)
//              -> viterbi_traceback (survivor memory, walk back TB_DEPTH steps
//                 through viterbi_next_state lookups from the best state)
//              -> viterbi_decode_out (registered {X2N, X1N}, out_valid)
// The split into branch metric, add-compare-select, trace-back, next-state and
// decoding blocks follows the published design; how each works inside is this design's.
//
// Timing: a symbol's distances presented with in_valid before rising edge n
// give their decoded pair with out_valid after edge n + TB_DEPTH, once the
// survivor memory has filled (the first TB_DEPTH symbols after reset only
// fill it). Reset is active high and asynchronous.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 17,
  parameter int unsigned PM_W     = 6,
  parameter int unsigned RESET_PM = 15
) (
  input  logic                   clk,
  input  logic                   res,
  input  logic                   in_valid,
  input  dist_t [NUM_POINTS-1:0] pt_dist,
  output logic                   out_valid,
  output logic                   X2N_out,
  output logic                   X1N_out,
  output logic [NUM_STATES-1:0][PM_W-1:0] pm   // normalised path metrics
);

  dist_t    [NUM_SUBSETS-1:0]          bm;
  logic     [NUM_SUBSETS-1:0]          x2_sel;
  dec_col_t                            dec_col;
  state_t                              best_state;
  logic     [1:0]                      x_dec;

  viterbi_bmu u_bmu (
    .pt_dist  (pt_dist),
    .bm    (bm),
    .x2_sel(x2_sel)
  );

  viterbi_acs #(.PM_W(PM_W), .RESET_PM(RESET_PM)) u_acs (
    .clk       (clk),
    .res       (res),
    .in_valid  (in_valid),
    .bm        (bm),
    .x2_sel    (x2_sel),
    .dec_col   (dec_col),
    .pm        (pm),
    .best_state(best_state)
  );

  viterbi_traceback #(.TB_DEPTH(TB_DEPTH)) u_tb (
    .clk        (clk),
    .res        (res),
    .in_valid   (in_valid),
    .dec_col    (dec_col),
    .start_state(best_state),
    .x_dec      (x_dec)
  );

  viterbi_decode_out #(.TB_DEPTH(TB_DEPTH)) u_out (
    .clk      (clk),
    .res      (res),
    .in_valid (in_valid),
    .x_dec    (x_dec),
    .out_valid(out_valid),
    .X2N_out  (X2N_out),
    .X1N_out  (X1N_out)
  );

endmodule
