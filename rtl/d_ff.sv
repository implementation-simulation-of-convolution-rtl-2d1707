// d_ff: D flip-flop with reset, the storage element of the encoder's shift
// register. q takes d on every rising edge of clk; an active-high reset clears
// q to 0 asynchronously. The port names follow the flip-flop that the encoder
// is built from; the reset polarity and its asynchronous action are this
// design's choice.
module d_ff (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) q <= 1'b0;
    else       q <= d;
  end

endmodule
