// sng_pkg -- constants shared by the stochastic number generator (SNG).
//
// The SNG converts an 8-bit binary target word into a stochastic bit stream
// whose probability of a 1 equals target/2^8. Its precision k = 8, the LFSR
// length and feedback taps follow the published 8-bit design. The default
// seed is this design's own choice (any non-zero value works).
package sng_pkg;

  // Probability precision k: width of the random number and of a target word.
  localparam int unsigned SNG_K = 8;

  // Feedback taps of the 8-bit LFSR, as a mask over the register bits
  // q[7:0] = {L8..L1}. The new L8 is L5 ^ L4 ^ L3 ^ L1, i.e. bits 4, 3, 2, 0.
  // This is the primitive polynomial x^8 + x^4 + x^3 + x^2 + 1, so the
  // register runs through all 255 non-zero states.
  localparam logic [SNG_K-1:0] SNG_LFSR_TAPS = 8'b0001_1101;

  // Value loaded into the LFSR by reset (L1 = 1, all others 0).
  localparam logic [SNG_K-1:0] SNG_DEFAULT_SEED = 8'b0000_0001;

endpackage
