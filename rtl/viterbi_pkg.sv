// viterbi_pkg: types, constants and trellis functions shared by the rate-2/3,
// constraint-length-3 convolutional encoder and its 4-state Viterbi decoder.
//
// The encoder keeps the last two values of the coded input bit X1N as its
// state, {X1N_1, X1N_2}. States are numbered S0..S3 with
//   S0 = {X1N_1=0, X1N_2=0}, S1 = {1,0}, S2 = {0,1}, S3 = {1,1},
// so the state value is coded {X1N_2, X1N_1} (bit 0 = X1N_1, bit 1 = X1N_2).
// The three output bits are Y2N = X2N, Y1N = X1N ^ X1N_2, Y0N = X1N_1.
// Y2N is uncoded: every trellis transition carries two parallel branches that
// differ only in Y2N; the pair {Y1N, Y0N} is the "subset" of the branch.
//
// Symbols are sent on 8-PSK with the natural mapping (symbol value Y at phase
// Y*45 degrees, a choice of this design). The receiver metric for a point k
// positions away on the circle is the squared Euclidean distance on the unit
// circle, 2 - 2cos(k*45deg), scaled by 7/4 and rounded to 3 bits:
//   k     : 0 1 2 3 4 5 6 7
//   d[k]  : 0 1 4 6 7 6 4 1
package viterbi_pkg;

  localparam int unsigned NUM_STATES = 4;
  localparam int unsigned NUM_POINTS = 8;
  localparam int unsigned NUM_SUBSETS = 4;
  localparam int unsigned DIST_W = 3;

  typedef logic [1:0] state_t;         // {X1N_2, X1N_1}
  typedef logic [2:0] symbol_t;        // {Y2N, Y1N, Y0N}
  typedef logic [1:0] subset_t;        // {Y1N, Y0N}
  typedef logic [DIST_W-1:0] dist_t;   // 3-bit 8-PSK distance / branch metric

  // One survivor entry per state and trellis step.
  typedef struct packed {
    logic x2;    // uncoded bit X2N on the surviving parallel branch
    logic pred;  // X1N_2 of the surviving predecessor state
  } decision_t;

  typedef decision_t [NUM_STATES-1:0] dec_col_t;

  // Branch subset {Y1N, Y0N} = {X1N ^ X1N_2, X1N_1}.
  function automatic subset_t branch_subset(state_t s, logic x1);
    return {x1 ^ s[1], s[0]};
  endfunction

  // A state is entered from the state {X1N_2 = b, X1N_1 = x1n_2}, where
  // x1n_2 is the X1N_2 of the state entered (input X1N moves X1N_1 to X1N_2
  // and becomes the new X1N_1). b is the bit the decoder has to decide.
  function automatic state_t pred_state(logic x1n_2, logic b);
    return {b, x1n_2};
  endfunction

  // Quantised 8-PSK distance for a phase difference of k positions.
  function automatic dist_t psk_distance(logic [2:0] k);
    case (k)
      3'd0:           return 3'd0;
      3'd1, 3'd7:     return 3'd1;
      3'd2, 3'd6:     return 3'd4;
      3'd3, 3'd5:     return 3'd6;
      default:        return 3'd7;
    endcase
  endfunction

endpackage
