// sng_dff -- single-bit D flip-flop, the storage cell of the LFSR.
//
// The published design builds its 8-bit LFSR from eight D flip-flops
// (DFF1..DFF8), drawn once as static CMOS cells and once as true
// single-phase clock (TSPC) cells. Both realise the same logic function: q
// takes the value of d at each rising clock edge. That function is what is
// modelled here; the transistor topology is left to the cell library.
//
// Interface: clk, d in; q out. rst_n is an asynchronous active-low reset
// that forces q to RESET_VALUE. The reset is this design's addition: the
// document only says the register must be initialised ("seeded") before use.
//
// Timing: q changes one clock edge after d is presented.
module sng_dff #(
  parameter logic RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VALUE;
    else        q <= d;
  end

endmodule
