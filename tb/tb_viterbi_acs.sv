// tb_viterbi_acs: checks the add-compare-select unit against a model that
// walks the trellis forwards: from every state {X1N_1, X1N_2} and input bit
// X1N it forms the branch to {X1N, X1N_1} with subset {X1N ^ X1N_2, X1N_1},
// keeps for each destination the smallest pm + bm (preferring the source with
// X1N_2 = 0 on a tie), subtracts the old minimum metric, and compares the
// decision column, the registered metrics and the best state every cycle.
// Random branch metrics are applied; in_valid is dropped now and then and the
// metrics must then hold.
module tb_viterbi_acs;
  import viterbi_pkg::*;
  localparam int PM_W = 6;
  localparam int RESET_PM = 15;
  logic clk = 1'b0, res = 1'b1, in_valid = 1'b0;
  dist_t    [NUM_SUBSETS-1:0] bm;
  logic     [NUM_SUBSETS-1:0] x2_sel;
  dec_col_t                   dec_col;
  logic     [NUM_STATES-1:0][PM_W-1:0] pm;
  state_t                     best_state;
  int checks = 0, failures = 0;

  viterbi_acs #(.PM_W(PM_W), .RESET_PM(RESET_PM)) dut (.*);

  always #5 clk = ~clk;

  // State index from its bits: index = 2*X1N_2 + X1N_1.
  function automatic int idx(int x1n_1, int x1n_2);
    return 2 * x1n_2 + x1n_1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mpm [4];
    int nbest, nmin, pm_spread_max;
    bm = '0; x2_sel = '0;
    mpm = '{0, RESET_PM, RESET_PM, RESET_PM};
    pm_spread_max = 0;
    @(negedge clk); res = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      int cand [4];
      int cpred [4];
      int cx2 [4];
      int omin, obest;
      in_valid = ($urandom_range(9) != 0);
      for (int s = 0; s < 4; s++) begin
        bm[s] = 3'($urandom);
        x2_sel[s] = 1'($urandom);
      end
      #1;
      // Best state of the current metrics.
      omin = mpm[0]; obest = 0;
      for (int s = 1; s < 4; s++) if (mpm[s] < omin) begin omin = mpm[s]; obest = s; end
      checks++;
      if (int'(best_state) != obest) begin failures++; $display("cycle %0d best=%0d exp=%0d", i, best_state, obest); end
      for (int s = 0; s < 4; s++) cand[s] = 1 << 20;
      for (int x1n_2 = 0; x1n_2 < 2; x1n_2++)
        for (int x1n_1 = 0; x1n_1 < 2; x1n_1++)
          for (int x1 = 0; x1 < 2; x1++) begin
            int src, dst, sub, c;
            src = idx(x1n_1, x1n_2);
            dst = idx(x1, x1n_1);
            sub = 2 * (x1 ^ x1n_2) + x1n_1;
            c = mpm[src] + int'(bm[sub]);
            if (c < cand[dst]) begin   // x1n_2 = 0 visited first: wins ties
              cand[dst] = c; cpred[dst] = x1n_2; cx2[dst] = int'(x2_sel[sub]);
            end
          end
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(dec_col[s].pred) != cpred[s] || int'(dec_col[s].x2) != cx2[s]) begin
          failures++;
          $display("cycle %0d state %0d: pred=%b x2=%b exp %0d %0d", i, s,
                   dec_col[s].pred, dec_col[s].x2, cpred[s], cx2[s]);
        end
      end
      @(posedge clk); #1;
      if (in_valid)
        for (int s = 0; s < 4; s++) mpm[s] = cand[s] - omin;
      nmin = mpm[0]; nbest = 0;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(pm[s]) != mpm[s]) begin failures++; $display("cycle %0d pm[%0d]=%0d exp=%0d", i, s, pm[s], mpm[s]); end
        if (mpm[s] - nmin > pm_spread_max) pm_spread_max = mpm[s] - nmin;
      end
      @(negedge clk);
    end
    $display("largest metric seen after normalisation: %0d", pm_spread_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
