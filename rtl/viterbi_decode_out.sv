// viterbi_decode_out: decoding block, the output stage of the decoder.
//
// It registers the input pair {X2N, X1N} that the trace-back decided for its
// oldest stored step and flags it valid. A fill counter tracks how many
// columns the survivor memory holds since reset; until TB_DEPTH columns are
// in, the oldest column is not real data and nothing is flagged. After that,
// every accepted symbol (in_valid) yields one decoded pair, registered on the
// same rising edge, so out_valid is a one-cycle pulse per decoded pair.
// Reset is active high and asynchronous. The counter and the registered
// output are this design's choices.
module viterbi_decode_out #(
  parameter int unsigned TB_DEPTH = 17
) (
  input  logic       clk,
  input  logic       res,
  input  logic       in_valid,
  input  logic [1:0] x_dec,     // {X2N, X1N} from the trace-back
  output logic       out_valid,
  output logic       X2N_out,
  output logic       X1N_out
);

  localparam int unsigned CNT_W = $clog2(TB_DEPTH + 1);

  logic [CNT_W-1:0] fill;

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      fill      <= '0;
      out_valid <= 1'b0;
      X2N_out   <= 1'b0;
      X1N_out   <= 1'b0;
    end else begin
      out_valid <= in_valid && (fill == CNT_W'(TB_DEPTH));
      if (in_valid) begin
        {X2N_out, X1N_out} <= x_dec;
        if (fill != CNT_W'(TB_DEPTH)) fill <= fill + 1'b1;
      end
    end
  end

endmodule
