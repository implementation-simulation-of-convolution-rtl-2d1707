// viterbi_encode: rate-2/3, constraint-length-3 convolutional encoder.
//
// Each clock it takes two input bits X2N, X1N and emits three bits
//   Y2N = X2N,  Y1N = X1N ^ X1N_2,  Y0N = X1N_1,
// where X1N_1 and X1N_2 are X1N delayed by one and two clocks, held in two
// D flip-flops. X2N passes uncoded. The outputs are combinational in the
// current inputs and the state (a Mealy machine), so a symbol leaves in the
// same cycle its input pair is applied; the state advances on the rising edge.
// The equations, the state table and the two-flip-flop structure follow the
// published design. Reset (active high, asynchronous) returns the state to S0.
module viterbi_encode (
  input  logic clk,
  input  logic res,
  input  logic X2N,
  input  logic X1N,
  output logic Y2N,
  output logic Y1N,
  output logic Y0N,
  output logic X1N_1,   // X1N one clock ago (state bit)
  output logic X1N_2    // X1N two clocks ago (state bit)
);

  d_ff u_ff1 (.clk(clk), .reset(res), .d(X1N),   .q(X1N_1));
  d_ff u_ff2 (.clk(clk), .reset(res), .d(X1N_1), .q(X1N_2));

  always_comb begin
    Y2N = X2N;
    Y1N = X1N ^ X1N_2;
    Y0N = X1N_1;
  end

endmodule
