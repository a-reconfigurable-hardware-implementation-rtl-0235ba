// ga_pkg: constants shared by the genetic-algorithm processor blocks.
//
// Holds the control-register address map (eight byte-wide write-only
// registers, addresses 0x0-0x7) and the default feedback polynomial of the
// LFSR random number generators. The register map follows the published
// address map of the core; the polynomial is this design's own choice, since
// only "an LFSR based generator" is specified.
package ga_pkg;

  // Control-register byte addresses on CPUAddr[3:0].
  typedef enum logic [3:0] {
    REG_CMLENGTH_LO  = 4'h0,  // chromosome length in memory words, minus 1, bits 7:0
    REG_CMLENGTH_HI  = 4'h1,  // bits 15:8
    REG_NETNUM_LO    = 4'h2,  // number of nets, minus 1, bits 7:0
    REG_NETNUM_HI    = 4'h3,  // bits 15:8
    REG_POPSIZ       = 4'h4,  // population size, minus 1
    REG_GENNUM       = 4'h5,  // generation count, minus 1
    REG_XOVER_RATE   = 4'h6,  // crossover probability, in 1/256 steps
    REG_MUT_RATE     = 4'h7   // mutation probability, in 1/256 steps
  } reg_addr_e;

  // Galois LFSR polynomial x^32 + x^22 + x^2 + x + 1 (maximal length).
  localparam logic [31:0] LFSR_POLY32 = 32'h8020_0003;

endpackage
