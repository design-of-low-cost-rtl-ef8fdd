// sng_lfsr -- 8-bit Fibonacci linear feedback shift register, the random
// number source (RNS) of the SNG.
//
// Eight D flip-flops DFF8..DFF1 hold the bits L8..L1 (q[7] = L8 ... q[0] = L1).
// On each clock edge the register shifts one place from L8 towards L1 and the
// XOR of the tapped bits enters at L8. With the default taps the new L8 is
// L5 ^ L4 ^ L3 ^ L1, taken from the three-XOR chain of the published schematic,
// which gives a maximal-length sequence of 2^8 - 1 = 255 states. Read as
// individual bits, every output is 1 in 128 of the 255 states, so each bit
// is close to unbiased.
//
// Seeding: the document says the LFSR outputs have to be initialised before
// use (the "seed"). Here reset loads the parameter SEED, and a synchronous
// seed_load pulse loads the seed input at the next clock edge; seed_load has
// priority over shifting. The all-zero state is a lock-up state of any XOR
// LFSR and must not be loaded. Shift direction, the reset and the seed
// port are this design's choices; the tap positions follow the document.
//
// Timing: one new state per clock; q is registered.
module sng_lfsr
  import sng_pkg::*;
#(
  parameter int unsigned    WIDTH = SNG_K,
  parameter logic [WIDTH-1:0] TAPS  = SNG_LFSR_TAPS,
  parameter logic [WIDTH-1:0] SEED  = SNG_DEFAULT_SEED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seed_load,
  input  logic [WIDTH-1:0] seed,
  output logic [WIDTH-1:0] q
);

  logic             feedback;
  logic [WIDTH-1:0] d;

  // XOR of the tapped bits, fed into the top flip-flop.
  assign feedback = ^(q & TAPS);

  always_comb begin
    if (seed_load) d = seed;
    else           d = {feedback, q[WIDTH-1:1]};
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_dff
    sng_dff #(.RESET_VALUE(SEED[i])) u_dff (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (d[i]),
      .q    (q[i])
    );
  end

endmodule
