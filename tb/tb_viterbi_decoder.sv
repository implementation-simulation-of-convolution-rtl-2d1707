// tb_viterbi_decoder: end-to-end test of the decoder alone (TB_DEPTH = 10).
// The testbench encodes a random stream of input pairs with its own table of
// the rate-2/3 code, moves some symbols by +-45 degrees (isolated symbol
// errors, at least 12 symbols apart), computes the eight 8-PSK distances with
// real arithmetic and feeds them to the decoder, with in_valid dropped now and
// then. Every decoded pair must equal the pair sent, and it must come out on
// the edge that accepts the symbol TB_DEPTH positions later.
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  localparam int D = 10;
  localparam int N = 3000;
  logic clk = 1'b0, res = 1'b1, in_valid = 1'b0;
  dist_t [NUM_POINTS-1:0] pt_dist;
  logic out_valid, X2N_out, X1N_out;
  logic [NUM_STATES-1:0][5:0] pm;
  int checks = 0, failures = 0;

  viterbi_decoder #(.TB_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_dist(int y, int k);
    return int'(1.75 * (2.0 - 2.0 * $cos(3.14159265358979 / 4.0 * real'(y - k))) + 1.0e-6);
  endfunction

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          accepted = 0;
  int          decoded = 0;
  logic [1:0]  sent [$];

  // Output monitor.
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (sent.size() == 0 || {X2N_out, X1N_out} !== sent[0] || accepted != decoded + D + 1) begin
        failures++;
        $display("decoded #%0d = %b%b, sent %b, accepted %0d", decoded, X2N_out, X1N_out,
                 (sent.size() != 0) ? sent[0] : 2'bxx, accepted);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      decoded++;
    end
  end

  initial begin
    automatic int x1n_1 = 0, x1n_2 = 0, last_err = -100, errors = 0;
    pt_dist = '0;
    @(negedge clk); res = 1'b0;
    for (int i = 0; i < N + D; i++) begin
      int x2, x1, y, rx;
      x2 = (i < N) ? int'($urandom_range(1)) : 0;
      x1 = (i < N) ? int'($urandom_range(1)) : 0;
      y  = 4 * x2 + 2 * (x1 ^ x1n_2) + x1n_1;
      rx = y;
      if (i < N && i - last_err >= 12 && $urandom_range(7) == 0) begin
        rx = ($urandom_range(1) != 0) ? y + 1 : y + 7;
        last_err = i; errors++;
      end
      for (int k = 0; k < 8; k++) pt_dist[k] = dist_t'(ref_dist(rx % 8, k));
      // Hold the symbol through a few stalled cycles now and then.
      while ($urandom_range(5) == 0) begin
        in_valid = 1'b0; @(negedge clk);
      end
      in_valid = 1'b1;
      if (i < N) sent.push_back(2'(2 * x2 + x1));
      @(posedge clk); accepted++;
      x1n_2 = x1n_1; x1n_1 = x1;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (decoded < N) begin failures++; $display("only %0d of %0d pairs decoded", decoded, N); end
    $display("symbol errors injected: %0d", errors);
    checks++;
    if (errors == 0) begin failures++; $display("no errors injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
