// viterbi_next_state: one step of the trace-back, read from the trellis table.
//
// Given the state reached at a trellis step and the decision column stored
// for that step, it returns the state the path came from (the next state of
// the backward walk) and the input pair {X2N, X1N} that labels the branch:
// X1N is the destination's X1N_1, X2N the stored uncoded bit, and the source
// is {stored pred bit, destination X1N_2}. Purely combinational; the
// trace-back chains one instance per stored step.
module viterbi_next_state
  import viterbi_pkg::*;
(
  input  state_t    state_in,   // state at the later time step
  input  dec_col_t  dec_col,    // decisions stored for that step
  output state_t    state_out,  // surviving predecessor state
  output logic [1:0] x_dec      // {X2N, X1N} on the surviving branch
);

  decision_t d;

  always_comb begin
    d         = dec_col[state_in];
    state_out = pred_state(state_in[1], d.pred);
    x_dec     = {d.x2, state_in[0]};
  end

endmodule
