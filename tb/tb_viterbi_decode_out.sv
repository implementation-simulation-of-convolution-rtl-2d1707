// tb_viterbi_decode_out: checks the decoder output stage. With TB_DEPTH = 5,
// the first five accepted symbols after reset must give no out_valid; from
// then on every accepted symbol gives a one-cycle out_valid pulse with the
// pair that was on x_dec at that edge, and the output holds otherwise.
module tb_viterbi_decode_out;
  localparam int D = 5;
  logic clk = 1'b0, res = 1'b1, in_valid = 1'b0;
  logic [1:0] x_dec = '0;
  logic out_valid, X2N_out, X1N_out;
  int checks = 0, failures = 0;

  viterbi_decode_out #(.TB_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int accepted = 0;
    automatic logic [1:0] held = '0;
    @(negedge clk); res = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      logic exp_v;
      in_valid = ($urandom_range(3) != 0);
      x_dec = 2'($urandom);
      exp_v = in_valid && (accepted >= D);
      if (in_valid) begin accepted++; held = x_dec; end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_v || {X2N_out, X1N_out} !== held) begin
        failures++;
        $display("cycle %0d: valid=%b exp=%b out=%b%b exp=%b", i, out_valid, exp_v,
                 X2N_out, X1N_out, held);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
