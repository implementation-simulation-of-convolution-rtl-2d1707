// viterbi_distances: receiver front end. For a received 8-PSK symbol it gives
// the distance to each of the eight constellation points, the input of the
// decoder's branch metric unit.
//
// The received symbol {Y2N,Y1N,Y0N} is taken as a phase index (natural
// mapping, index*45 degrees). Output pt_dist[k] (k = 0..7, the signals in0..in7)
// is psk_distance((Y - k) mod 8): the squared Euclidean distance on the unit
// circle quantised to 3 bits, {0,1,4,6,7,6,4,1} for 0..7 steps apart.
// The outputs are registered: they hold the distances of the symbol present
// before the last rising edge, and dist_valid rises one clock after reset is
// released. Reset (active high, asynchronous) clears the distances and valid.
// The 3-bit width, the clock and reset inputs and the distance values
// follow the published design's simulation waveforms; the natural mapping and
// the quantisation formula that reproduce those values are this design's.
module viterbi_distances
  import viterbi_pkg::*;
(
  input  logic                        clk,
  input  logic                        res,
  input  logic                        Y2N,
  input  logic                        Y1N,
  input  logic                        Y0N,
  output dist_t [NUM_POINTS-1:0]      pt_dist,
  output logic                        dist_valid
);

  symbol_t y;
  assign y = {Y2N, Y1N, Y0N};

  always_ff @(posedge clk or posedge res) begin
    if (res) begin
      pt_dist       <= '0;
      dist_valid <= 1'b0;
    end else begin
      for (int k = 0; k < NUM_POINTS; k++)
        pt_dist[k] <= psk_distance(y - 3'(k));
      dist_valid <= 1'b1;
    end
  end

endmodule
