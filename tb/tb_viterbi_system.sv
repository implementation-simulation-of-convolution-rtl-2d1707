// tb_viterbi_system: end-to-end test of encoder, channel, distance front end
// and decoder at the default parameters (trace-back depth 17).
//
// A random stream of input pairs is applied, one per clock. Isolated channel
// errors of +-45 degrees are injected on err_rot (at least 12 symbols apart)
// and every decoded pair must equal the pair sent. A pair applied before
// rising edge n must come out with out_valid after edge n + TB_DEPTH + 1. The transmitted symbol Y
// is compared with the code equations, and the decoder's mechanisms are
// counted, each of which must happen at least once: survivor-memory fill
// (no output for the first TB_DEPTH + 1 clocks after reset), an injected error corrected,
// path-metric normalisation (a non-zero minimum subtracted), the parallel
// branch with Y2N = 1 chosen, a trace-back that starts outside S0, and an
// add-compare-select decision for the predecessor with X1N_2 = 1.
module tb_viterbi_system;
  import viterbi_pkg::*;
  localparam int D = 17;     // default trace-back depth of the top
  localparam int N = 4000;
  logic clk = 1'b0, res = 1'b1, X2N = 1'b0, X1N = 1'b0;
  logic [2:0] err_rot = '0;
  symbol_t Y;
  dist_t [NUM_POINTS-1:0] pt_dist;
  logic out_valid, X2N_out, X1N_out;
  state_t enc_state;
  logic [NUM_STATES-1:0][5:0] pm;
  int checks = 0, failures = 0;

  viterbi_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  int decoded = 0;
  int n_fill = 0, n_corrected = 0, n_norm = 0, n_x2 = 0, n_start = 0, n_pred1 = 0;
  logic [1:0] sent [$];
  int         sent_cycle [$];
  int         err_at [$];

  // Cycle counter and mechanism counters, sampled just before each edge.
  always @(posedge clk) begin
    if (!res) begin
      if (dut.u_dec.u_acs.pm_min != 0 && dut.dist_valid) n_norm++;
      if (dut.u_dec.best_state != 0) n_start++;
      for (int s = 0; s < 4; s++) begin
        if (dut.u_dec.in_valid && dut.u_dec.dec_col[s].pred) n_pred1++;
        if (dut.u_dec.in_valid && dut.u_dec.dec_col[s].x2) n_x2++;
      end
      cycle++;
    end
  end

  // Output monitor: value and latency.
  always @(posedge clk) begin
    #1;
    if (!out_valid && decoded == 0 && !res) n_fill++;
    if (out_valid && sent.size() == 0) decoded++;   // flush symbols after the stream
    else if (out_valid) begin
      checks++;
      if (sent.size() == 0 || {X2N_out, X1N_out} !== sent[0] || cycle - sent_cycle[0] != D + 2) begin
        failures++;
        $display("decoded #%0d = %b%b, sent %b, latency %0d", decoded, X2N_out, X1N_out,
                 (sent.size() != 0) ? sent[0] : 2'b00, (sent.size() != 0) ? cycle - sent_cycle[0] : -1);
      end else if (err_at.size() != 0 && err_at[0] == decoded) begin
        n_corrected++;
      end
      if (err_at.size() != 0 && err_at[0] <= decoded) void'(err_at.pop_front());
      if (sent.size() != 0) begin void'(sent.pop_front()); void'(sent_cycle.pop_front()); end
      decoded++;
    end
  end

  initial begin
    automatic int x1n_1 = 0, x1n_2 = 0, last_err = -100;
    @(negedge clk); res = 1'b0;
    for (int i = 0; i < N + D; i++) begin
      int x2, x1;
      x2 = (i < N) ? int'($urandom_range(1)) : 0;
      x1 = (i < N) ? int'($urandom_range(1)) : 0;
      {X2N, X1N} = 2'(2 * x2 + x1);
      err_rot = '0;
      if (i < N && i - last_err >= 12 && $urandom_range(7) == 0) begin
        err_rot = ($urandom_range(1) != 0) ? 3'd1 : 3'd7;
        last_err = i;
        err_at.push_back(i);   // index among decoded pairs
      end
      #1;
      checks++;
      if (Y !== symbol_t'(4 * x2 + 2 * (x1 ^ x1n_2) + x1n_1)) begin
        failures++; $display("symbol %0d: Y=%b", i, Y);
      end
      if (i < N) begin
        sent.push_back(2'(2 * x2 + x1));
        sent_cycle.push_back(cycle);
      end
      @(posedge clk);
      x1n_2 = x1n_1; x1n_1 = x1;
      @(negedge clk);
    end
    repeat (D + 3) @(negedge clk);
    checks++;
    if (decoded < N) begin failures++; $display("only %0d of %0d pairs decoded", decoded, N); end
    checks++;
    if (n_fill != D + 1) begin failures++; $display("first output after %0d clocks, expected %0d", n_fill, D + 1); end
    $display("fill=%0d corrected=%0d normalised=%0d x2_branch=%0d start_not_S0=%0d pred1=%0d",
             n_fill, n_corrected, n_norm, n_x2, n_start, n_pred1);
    checks += 6;
    if (n_fill == 0)      begin failures++; $display("memory fill never seen"); end
    if (n_corrected == 0) begin failures++; $display("no error corrected"); end
    if (n_norm == 0)      begin failures++; $display("normalisation never active"); end
    if (n_x2 == 0)        begin failures++; $display("Y2N = 1 branch never chosen"); end
    if (n_start == 0)     begin failures++; $display("trace-back never started outside S0"); end
    if (n_pred1 == 0)     begin failures++; $display("predecessor X1N_2 = 1 never chosen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
