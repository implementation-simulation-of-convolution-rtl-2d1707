// tb_viterbi_bmu: checks the branch metric unit with random distance sets.
// For subset s the expected metric is the smaller of the distances to points
// s and s+4 and the expected Y2N is 1 only when point s+4 is strictly closer.
module tb_viterbi_bmu;
  import viterbi_pkg::*;
  dist_t [NUM_POINTS-1:0]  pt_dist;
  dist_t [NUM_SUBSETS-1:0] bm;
  logic  [NUM_SUBSETS-1:0] x2_sel;
  int checks = 0, failures = 0;

  viterbi_bmu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 8; k++) pt_dist[k] = 3'($urandom);
      if (i % 5 == 0) pt_dist[4 + i % 4] = pt_dist[i % 4];  // force ties
      #1;
      for (int s = 0; s < 4; s++) begin
        int a, b, m;
        logic sel;
        a = int'(pt_dist[s]); b = int'(pt_dist[s + 4]);
        sel = (b < a);
        m = sel ? b : a;
        checks++;
        if (int'(bm[s]) != m || x2_sel[s] !== sel) begin
          failures++;
          $display("subset %0d: d0=%0d d1=%0d bm=%0d sel=%b", s, a, b, bm[s], x2_sel[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
