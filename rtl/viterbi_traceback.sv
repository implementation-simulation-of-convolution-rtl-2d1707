// viterbi_traceback: survivor memory and trace-back of the Viterbi decoder.
//
// The memory is a shift register of TB_DEPTH decision columns, column 0 the
// newest. Each in_valid cycle the ACS's newest column is shifted in. The
// trace-back starts from start_state (the state with the best path metric)
// at the newest column and walks TB_DEPTH steps back through a chain of
// viterbi_next_state lookups, all within one cycle. The input pair on the
// branch of the oldest column is the decision: it is TB_DEPTH trellis steps
// old, long enough that the surviving paths have merged.
//
// Timing: x_dec reflects the registered columns combinationally. Reset (active
// high, asynchronous) clears the memory. The walk back from the best state at
// the newest step follows the published design, and the default depth of 17 steps
// matches its trace-back window (t = 17 back to t = 0). Doing the whole walk
// in one cycle over a shift-register memory is this design's choice.
module viterbi_traceback
  import viterbi_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 17
) (
  input  logic       clk,
  input  logic       res,
  input  logic       in_valid,
  input  dec_col_t   dec_col,       // newest column from the ACS
  input  state_t     start_state,   // best state at the newest column
  output logic [1:0] x_dec          // {X2N, X1N} decided for the oldest column
);

  dec_col_t mem [TB_DEPTH];
  state_t   chain [TB_DEPTH];
  logic [1:0] bits [TB_DEPTH];
  state_t   next_st [TB_DEPTH];

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      for (int i = 0; i < TB_DEPTH; i++) mem[i] <= '0;
    end else if (in_valid) begin
      mem[0] <= dec_col;
      for (int i = 1; i < TB_DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  // chain[i] is the state on the surviving path after step i; the last
  // predecessor (next_st[TB_DEPTH-1]) is not needed.
  assign chain[0] = start_state;
  for (genvar i = 1; i < TB_DEPTH; i++) begin : g_link
    assign chain[i] = next_st[i-1];
  end

  for (genvar i = 0; i < TB_DEPTH; i++) begin : g_step
    viterbi_next_state u_step (
      .state_in (chain[i]),
      .dec_col  (mem[i]),
      .state_out(next_st[i]),
      .x_dec    (bits[i])
    );
  end

  assign x_dec = bits[TB_DEPTH-1];

endmodule
