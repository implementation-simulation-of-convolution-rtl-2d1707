// viterbi_system: convolutional encoder and Viterbi decoder pair, end to end.
//
// Transmit side: viterbi_encode turns the input pair {X2N, X1N}, one per
// clock, into the 3-bit symbol Y = {Y2N, Y1N, Y0N}. The symbol is sent as
// one 8-PSK phase. Channel: the received phase is Y + err_rot (mod 8), so
// err_rot = 0 is a clean channel and any other value moves the symbol by
// err_rot*45 degrees, a symbol error. Receive side: viterbi_distances turns
// the received phase into eight 3-bit distances (registered), and
// viterbi_decoder recovers {X2N, X1N}.
//
// Timing: an input pair applied before rising edge n comes out on
// {X2N_out, X1N_out} with out_valid after edge n + 1 + TB_DEPTH. The first
// TB_DEPTH pairs after reset only fill the decoder's survivor memory and are
// not output; feed TB_DEPTH further pairs to flush the last real ones out.
// res is active high and asynchronous. The channel model with its phase
// rotation input is this design's stand-in for the error input of the
// encoder/decoder test set-up.
module viterbi_system
  import viterbi_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 17,
  parameter int unsigned PM_W     = 6,
  parameter int unsigned RESET_PM = 15
) (
  input  logic                   clk,
  input  logic                   res,
  input  logic                   X2N,
  input  logic                   X1N,
  input  logic [2:0]             err_rot,   // channel phase error, 45-degree steps
  output symbol_t                Y,         // transmitted symbol {Y2N, Y1N, Y0N}
  output dist_t [NUM_POINTS-1:0] pt_dist,      // received distances in0..in7
  output logic                   out_valid,
  output logic                   X2N_out,
  output logic                   X1N_out,
  output state_t                 enc_state, // encoder state {X1N_2, X1N_1}
  output logic [NUM_STATES-1:0][PM_W-1:0] pm  // decoder path metrics
);

  symbol_t y_rx;
  logic    dist_valid;

  viterbi_encode u_enc (
    .clk  (clk),
    .res  (res),
    .X2N  (X2N),
    .X1N  (X1N),
    .Y2N  (Y[2]),
    .Y1N  (Y[1]),
    .Y0N  (Y[0]),
    .X1N_1(enc_state[0]),
    .X1N_2(enc_state[1])
  );

  assign y_rx = Y + err_rot;

  viterbi_distances u_dist (
    .clk       (clk),
    .res       (res),
    .Y2N       (y_rx[2]),
    .Y1N       (y_rx[1]),
    .Y0N       (y_rx[0]),
    .pt_dist      (pt_dist),
    .dist_valid(dist_valid)
  );

  viterbi_decoder #(.TB_DEPTH(TB_DEPTH), .PM_W(PM_W), .RESET_PM(RESET_PM)) u_dec (
    .clk      (clk),
    .res      (res),
    .in_valid (dist_valid),
    .pt_dist     (pt_dist),
    .out_valid(out_valid),
    .X2N_out  (X2N_out),
    .X1N_out  (X1N_out),
    .pm       (pm)
  );

endmodule
