// tb_viterbi_reference_stream: replays the reference encoder/decoder run of
// the design through viterbi_system at its default parameters. The input
// pairs {X2N, X1N} cycle through 10, 11, 00, 01 from reset. The first six
// transmitted symbols must be 100, 110, 001, 000, 101, 100 and the
// distances to points 0..4 the values listed below; the stream is then kept
// running and every decoded pair must equal the pair sent, with a few +-45
// degree channel errors injected after the reference part.
module tb_viterbi_reference_stream;
  import viterbi_pkg::*;
  localparam int D = 17;
  localparam int N = 400;
  logic clk = 1'b0, res = 1'b1, X2N = 1'b0, X1N = 1'b0;
  logic [2:0] err_rot = '0;
  symbol_t Y;
  dist_t [NUM_POINTS-1:0] pt_dist;
  logic out_valid, X2N_out, X1N_out;
  state_t enc_state;
  logic [NUM_STATES-1:0][5:0] pm;
  int checks = 0, failures = 0;

  logic [1:0] x_seq [4] = '{2'b10, 2'b11, 2'b00, 2'b01};
  symbol_t    y_ref [6] = '{3'b100, 3'b110, 3'b001, 3'b000, 3'b101, 3'b100};
  // Reference distances to points 0..4, one row per point.
  dist_t      d_ref [5][6] = '{'{3'b111, 3'b100, 3'b001, 3'b000, 3'b110, 3'b111},
                               '{3'b110, 3'b110, 3'b000, 3'b001, 3'b111, 3'b110},
                               '{3'b100, 3'b111, 3'b001, 3'b100, 3'b110, 3'b100},
                               '{3'b001, 3'b110, 3'b100, 3'b110, 3'b100, 3'b001},
                               '{3'b000, 3'b100, 3'b110, 3'b111, 3'b001, 3'b000}};

  viterbi_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int decoded = 0;
  always @(posedge clk) begin
    #1;
    if (out_valid && decoded < N) begin
      checks++;
      if ({X2N_out, X1N_out} !== x_seq[decoded % 4]) begin
        failures++;
        $display("decoded #%0d = %b%b, sent %b", decoded, X2N_out, X1N_out, x_seq[decoded % 4]);
      end
      decoded++;
    end
  end

  initial begin
    @(negedge clk); res = 1'b0;
    for (int i = 0; i < N + D + 2; i++) begin
      {X2N, X1N} = x_seq[i % 4];
      err_rot = (i >= 20 && i < N && i % 23 == 0) ? ((i % 2 != 0) ? 3'd1 : 3'd7) : 3'd0;
      #1;
      if (i < 6) begin
        checks++;
        if (Y !== y_ref[i]) begin failures++; $display("symbol %0d: Y=%b exp %b", i, Y, y_ref[i]); end
      end
      @(posedge clk); #1;
      if (i < 6) begin
        for (int k = 0; k < 5; k++) begin
          checks++;
          if (pt_dist[k] !== d_ref[k][i]) begin
            failures++; $display("symbol %0d in%0d = %b exp %b", i, k, pt_dist[k], d_ref[k][i]);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (decoded != N) begin failures++; $display("decoded %0d of %0d", decoded, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
