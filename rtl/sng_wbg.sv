// sng_wbg -- weighted binary generator (WBG), the probability conversion
// circuit of the SNG.
//
// The first level (sng_wbg_weights) turns the random bits L[K..1] into the
// weights W[K..1], of which at most one is 1 and W_i has probability
// 2^-(K-i+1). The second level ANDs each W_i with target bit x_i, and an OR
// tree of K-1 two-input OR gates merges the K products into the output:
//   P(out) = sum_i x_i * 2^-(K-i+1) = X / 2^K,   X = {x_K .. x_1}.
// Over one full period of an 8-bit maximal LFSR (255 non-zero states) W_i is
// 1 in exactly 2^(i-1) states, so the output holds exactly X ones. This
// structure follows the published circuit; only the gate grouping of the
// first level differs.
//
// Interface: l = random bits (bit K-1 = L8), x = target word (bit K-1 =
// x8, the most significant), seq = stochastic output bit.
// Timing: purely combinational.
module sng_wbg
  import sng_pkg::*;
#(
  parameter int unsigned K = SNG_K
) (
  input  logic [K-1:0] l,
  input  logic [K-1:0] x,
  output logic         seq
);

  logic [K-1:0] w;

  sng_wbg_weights #(.K(K)) u_weights (
    .l(l),
    .w(w)
  );

  // Second level: AND with the target bits, then the OR tree.
  assign seq = |(w & x);

endmodule
