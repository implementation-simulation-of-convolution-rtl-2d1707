// viterbi_bmu: branch metric unit of the 4-state Viterbi decoder.
//
// A trellis transition fixes the subset {Y1N,Y0N} of the branch but not the
// uncoded bit Y2N, so each transition stands for two parallel branches whose
// symbols are {0,subset} and {1,subset}. For each of the four subsets this
// unit takes the smaller of the two point distances as the branch metric and
// records which Y2N gave it (ties pick Y2N = 0). The result is shared by all
// transitions with that subset, so the add-compare-select stage needs only
// four metrics instead of eight. Purely combinational.
// Computing branch metrics from the eight point distances follows the published design;
// resolving the parallel branches here, before the ACS, is this design's choice.
module viterbi_bmu
  import viterbi_pkg::*;
(
  input  dist_t [NUM_POINTS-1:0]  pt_dist,   // distance to constellation point k
  output dist_t [NUM_SUBSETS-1:0] bm,     // branch metric of subset {Y1N,Y0N}
  output logic  [NUM_SUBSETS-1:0] x2_sel  // Y2N of the closer parallel branch
);

  always_comb begin
    for (int s = 0; s < NUM_SUBSETS; s++) begin
      x2_sel[s] = pt_dist[4 + s] < pt_dist[s];
      bm[s]     = x2_sel[s] ? pt_dist[4 + s] : pt_dist[s];
    end
  end

endmodule
