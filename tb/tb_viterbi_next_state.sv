// tb_viterbi_next_state: exhaustive check of one trace-back step. For every
// state and random decision columns the expected predecessor is the state
// {X1N_1, X1N_2} = {X1N_2 of the given state, stored pred bit}, and the
// expected input pair is {stored x2 bit, X1N_1 of the given state}.
module tb_viterbi_next_state;
  import viterbi_pkg::*;
  state_t     state_in, state_out;
  dec_col_t   dec_col;
  logic [1:0] x_dec;
  int checks = 0, failures = 0;

  viterbi_next_state dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int s = 0; s < 4; s++) begin
        int x1n_1, x1n_2, p_x1n_1, p_x1n_2, exp_state;
        state_in = state_t'(s);
        dec_col = dec_col_t'($urandom);
        #1;
        x1n_1 = s % 2; x1n_2 = s / 2;
        p_x1n_1 = x1n_2;
        p_x1n_2 = int'(dec_col[s].pred);
        exp_state = 2 * p_x1n_2 + p_x1n_1;
        checks++;
        if (int'(state_out) != exp_state || x_dec !== {dec_col[s].x2, 1'(x1n_1)}) begin
          failures++;
          $display("state %0d col %h: out=%0d x=%b exp %0d", s, dec_col, state_out, x_dec, exp_state);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
