// sng_top -- low-cost stochastic number generator: one LFSR shared by two
// weighted binary generators.
//
// A stochastic number generator turns a binary word X into a bit stream in
// which 1s appear with probability X / 2^K. Normally each SNG has its own
// random source; here one 8-bit LFSR drives two WBGs, so two independent
// target words X and Y produce two streams (out1, out2) for the cost of one
// random number source. Both WBGs see the same random bits L8..L1 every
// cycle; over any 255 consecutive cycles out1 holds exactly X ones and out2
// exactly Y ones. Both WBGs select the target bit at the same position each
// cycle, so the two streams are correlated: they are 1 together exactly when
// that bit is 1 in both X and Y, and identical when X = Y.
//
// Interface: clk, rst_n (asynchronous, active low, loads the default seed),
// seed_load/seed (synchronous seed load, from the published "SEED" step),
// x and y (target words, bit K-1 most significant), out1 and out2 (stochastic
// bits), lfsr_q (the shared random bits L8..L1, brought out for observation).
// Timing: out1/out2 are combinational functions of the registered LFSR
// state and of x/y; one new stochastic bit per clock. The structure follows
// the document; reset, the seed port and lfsr_q are this design's choices.
module sng_top
  import sng_pkg::*;
#(
  parameter int unsigned      K    = SNG_K,
  parameter logic [K-1:0]     TAPS = SNG_LFSR_TAPS,
  parameter logic [K-1:0]     SEED = SNG_DEFAULT_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [K-1:0] seed,
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  output logic         out1,
  output logic         out2,
  output logic [K-1:0] lfsr_q
);

  sng_lfsr #(.WIDTH(K), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .seed_load(seed_load),
    .seed     (seed),
    .q        (lfsr_q)
  );

  sng_wbg #(.K(K)) u_wbg1 (
    .l  (lfsr_q),
    .x  (x),
    .seq(out1)
  );

  sng_wbg #(.K(K)) u_wbg2 (
    .l  (lfsr_q),
    .x  (y),
    .seq(out2)
  );

endmodule
