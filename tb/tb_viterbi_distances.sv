// tb_viterbi_distances: checks the 8-PSK distance front end. For every
// received symbol (all eight, then random ones) the eight registered outputs
// must equal round(7/4 * (2 - 2cos(45deg * (Y - k)))), computed here with
// real arithmetic, one clock after the symbol was applied; dist_valid must be
// low in reset and high afterwards.
module tb_viterbi_distances;
  import viterbi_pkg::*;
  logic clk = 1'b0, res = 1'b1, Y2N = 1'b0, Y1N = 1'b0, Y0N = 1'b0;
  dist_t [NUM_POINTS-1:0] pt_dist;
  logic dist_valid;
  int checks = 0, failures = 0;

  viterbi_distances dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_dist(int y, int k);
    real ang;
    ang = 3.14159265358979 / 4.0 * real'(y - k);
    return int'(1.75 * (2.0 - 2.0 * $cos(ang)) + 1.0e-6);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (dist_valid !== 1'b0) begin failures++; $display("valid high in reset"); end
    res = 1'b0;
    for (int i = 0; i < 200; i++) begin
      int y;
      y = (i < 8) ? i : int'($urandom_range(7));
      {Y2N, Y1N, Y0N} = 3'(y);
      @(posedge clk); #1;
      {Y2N, Y1N, Y0N} = 3'(y + 3);  // must not change the registered outputs
      #1;
      checks++;
      if (dist_valid !== 1'b1) begin failures++; $display("valid low"); end
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(pt_dist[k]) != ref_dist(y, k)) begin
          failures++;
          $display("y=%0d k=%0d: dist=%0d exp=%0d", y, k, pt_dist[k], ref_dist(y, k));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
