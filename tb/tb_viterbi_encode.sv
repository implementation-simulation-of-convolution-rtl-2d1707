// tb_viterbi_encode: checks the rate-2/3 encoder against its state table.
// The expected output symbol and next state for each (state, input pair)
// are written out as a table (states S0..S3, S1 = {X1N_1=1, X1N_2=0}); a
// random input stream is applied and, in every cycle, the combinational
// outputs Y2N/Y1N/Y0N and the state bits X1N_1/X1N_2 are compared.
module tb_viterbi_encode;
  logic clk = 1'b0, res = 1'b1, X2N = 1'b0, X1N = 1'b0;
  logic Y2N, Y1N, Y0N, X1N_1, X1N_2;
  int checks = 0, failures = 0;

  // Expected {Y2N,Y1N,Y0N} and next state index, by [state][{X2N,X1N}].
  logic [2:0] y_tab  [4][4] = '{'{3'b000, 3'b010, 3'b100, 3'b110},
                                '{3'b001, 3'b011, 3'b101, 3'b111},
                                '{3'b010, 3'b000, 3'b110, 3'b100},
                                '{3'b011, 3'b001, 3'b111, 3'b101}};
  int          ns_tab [4][4] = '{'{0, 1, 0, 1},
                                 '{2, 3, 2, 3},
                                 '{0, 1, 0, 1},
                                 '{2, 3, 2, 3}};
  // State bits {X1N_1, X1N_2} of S0..S3.
  logic [1:0] sbits [4] = '{2'b00, 2'b10, 2'b01, 2'b11};

  viterbi_encode dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int st = 0;
    automatic int seen [4] = '{0, 0, 0, 0};
    @(negedge clk); res = 1'b0;
    for (int i = 0; i < 400; i++) begin
      int x;
      x = int'($urandom_range(3));
      {X2N, X1N} = 2'(x);
      #1;
      checks++;
      if ({Y2N, Y1N, Y0N} !== y_tab[st][x] || {X1N_1, X1N_2} !== sbits[st]) begin
        failures++;
        $display("step %0d S%0d x=%0d: Y=%b%b%b exp %b, state %b%b exp %b", i, st, x,
                 Y2N, Y1N, Y0N, y_tab[st][x], X1N_1, X1N_2, sbits[st]);
      end
      seen[st]++;
      st = ns_tab[st][x];
      @(negedge clk);
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("state S%0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
