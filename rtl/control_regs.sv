// control_regs: write-only configuration registers of the GA processor.
//
// A host writes one byte per clock: CPUData is stored into the register
// selected by CPUAddr on a rising edge where CPUWr is high (one-cycle write,
// no wait states, no read-back). The map is:
//   0x0/0x1 CMLength  16 bit  chromosome length in memory words, minus one
//   0x2/0x3 NetNum    16 bit  number of nets, minus one
//   0x4     PopSiz     8 bit  population size, minus one
//   0x5     GenNum     8 bit  number of generations, minus one
//   0x6     CrossoverRate     probability = value/256
//   0x7     MutationRate      probability = value/256
// All registers reset to zero (active-low asynchronous reset).
//
// The map, the widths and the reset values follow the published register
// description. The registers hold "count minus one", as the reference
// stimulus of the design programs them; the outputs are cut to the widths the
// datapath uses (CMField bits of CMLength, MaxNetNumBits bits of NetNum).
// GenNum keeps all 8 bits: the register figure shows only 6 of them in use,
// but 6 bits could not run the 100-generation experiments reported for the
// design, so this design uses the full byte.
module control_regs #(
  parameter int CMField       = 8,
  parameter int MaxNetNumBits = 8
) (
  input  logic                     Clk,
  input  logic                     ResetN,
  input  logic                     CPUWr,
  input  logic [3:0]               CPUAddr,
  input  logic [7:0]               CPUData,
  output logic [CMField-1:0]       CMLength,
  output logic [MaxNetNumBits-1:0] NetNum,
  output logic [7:0]               PopSiz,
  output logic [7:0]               GenNum,
  output logic [7:0]               CrossoverRate,
  output logic [7:0]               MutationRate
);
  import ga_pkg::*;

  logic [15:0] cmlength_q, netnum_q;

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN) begin
      cmlength_q    <= '0;
      netnum_q      <= '0;
      PopSiz        <= '0;
      GenNum        <= '0;
      CrossoverRate <= '0;
      MutationRate  <= '0;
    end else if (CPUWr) begin
      unique case (CPUAddr)
        REG_CMLENGTH_LO: cmlength_q[7:0]  <= CPUData;
        REG_CMLENGTH_HI: cmlength_q[15:8] <= CPUData;
        REG_NETNUM_LO:   netnum_q[7:0]    <= CPUData;
        REG_NETNUM_HI:   netnum_q[15:8]   <= CPUData;
        REG_POPSIZ:      PopSiz           <= CPUData;
        REG_GENNUM:      GenNum           <= CPUData;
        REG_XOVER_RATE:  CrossoverRate    <= CPUData;
        REG_MUT_RATE:    MutationRate     <= CPUData;
        default: ;  // addresses 0x8-0xF are not mapped
      endcase
    end
  end

  assign CMLength = cmlength_q[CMField-1:0];
  assign NetNum   = netnum_q[MaxNetNumBits-1:0];

endmodule
