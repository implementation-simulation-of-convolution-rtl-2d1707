// tb_viterbi_traceback: random decision columns and start states are shifted
// in; a model keeps its own history of columns and walks it back TB_DEPTH
// steps from the start state (predecessor = {pred bit, X1N_1 = X1N_2 of the
// later state}). The decoded pair of the oldest step is compared every
// cycle once the memory is full; in_valid is dropped now and then.
module tb_viterbi_traceback;
  import viterbi_pkg::*;
  localparam int D = 6;
  logic clk = 1'b0, res = 1'b1, in_valid = 1'b0;
  dec_col_t   dec_col;
  state_t     start_state;
  logic [1:0] x_dec;
  int checks = 0, failures = 0;

  viterbi_traceback #(.TB_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec_col_t hist [$];
    dec_col = '0; start_state = '0;
    @(negedge clk); res = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      in_valid = ($urandom_range(7) != 0);
      dec_col = dec_col_t'($urandom);
      @(posedge clk); #1;
      if (in_valid) hist.push_front(dec_col);
      if (hist.size() > D) void'(hist.pop_back());
      start_state = state_t'($urandom);
      #1;
      if (hist.size() == D) begin
        int st, x1, x2;
        st = int'(start_state);
        for (int k = 0; k < D; k++) begin
          x1 = st % 2;
          x2 = int'(hist[k][st].x2);
          st = 2 * int'(hist[k][st].pred) + st / 2;
        end
        checks++;
        if (x_dec !== {1'(x2), 1'(x1)}) begin
          failures++;
          $display("cycle %0d: x_dec=%b exp=%0d%0d", i, x_dec, x2, x1);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
