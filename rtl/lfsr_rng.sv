// lfsr_rng: 32-bit pseudo random number generator.
//
// A Galois linear feedback shift register that advances by one step on every
// clock where `advance` is high and shows its whole 32-bit state on `rnd`.
// Every block that needs random numbers (selection, crossover/mutation and the
// main controller) has its own instance, each with its own non-zero SEED, so
// their sequences differ. The blocks take fields of `rnd` as addresses, masks
// and 8-bit probability samples.
//
// The GA processor specifies an LFSR based generator and nothing more; the
// length, the polynomial (x^32+x^22+x^2+x+1, maximal length) and the seeding
// are this design's choices.
//
// Timing: `rnd` is a register; after a clock with `advance` high it holds the
// next state. Active-low asynchronous reset loads SEED. A zero SEED would lock
// the register and is replaced by 1.
module lfsr_rng #(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic        Clk,
  input  logic        ResetN,
  input  logic        advance,
  output logic [31:0] rnd
);
  import ga_pkg::*;

  localparam logic [31:0] SEED_NZ = (SEED == 32'd0) ? 32'd1 : SEED;

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN)      rnd <= SEED_NZ;
    else if (advance) rnd <= rnd[0] ? ((rnd >> 1) ^ LFSR_POLY32) : (rnd >> 1);
  end

endmodule
