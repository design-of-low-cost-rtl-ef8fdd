// sng_wbg_weights -- first level of the weighted binary generator (WBG).
//
// From K unbiased random bits L[K..1] it forms the weights W[K..1]:
//   W_K = L_K,  W_i = L_i AND NOT L_{i+1} AND ... AND NOT L_K  (i < K).
// At most one W_i is 1: the one at the highest set bit of L. For uniformly
// random L, W_i is 1 with probability 2^-(K-i+1), i.e. W8 = 1/2, W7 = 1/4 ...
// W1 = 1/256 for K = 8. In the published circuit each W_i is built by a
// small tree of AND gates with inverted inputs (blocks R2..R8); here the
// same function is written as a priority chain.
//
// Bit i-1 of the vectors holds L_i / W_i (bit K-1 is L8/W8).
// Timing: purely combinational.
module sng_wbg_weights
  import sng_pkg::*;
#(
  parameter int unsigned K = SNG_K
) (
  input  logic [K-1:0] l,
  output logic [K-1:0] w
);

  // higher_zero[i] is 1 when every bit above i is 0.
  logic [K-1:0] higher_zero;

  always_comb begin
    higher_zero[K-1] = 1'b1;
    for (int i = K - 2; i >= 0; i--) begin
      higher_zero[i] = higher_zero[i+1] & ~l[i+1];
    end
    w = l & higher_zero;
  end

endmodule
