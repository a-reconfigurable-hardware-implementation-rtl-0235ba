// ga_processor: GA circuit-partitioning processor with its memories.
//
// The GA core (ga_core) joined to its three synchronous RAMs, as the design is
// mapped onto one FPGA with block RAM: the netlist memory (single port,
// 2**(MaxNetNumBits+CMField) words), the chromosome memory (separate read and
// write ports, 2**(FMAddrWidth+CMField) words, parent and child halves) and
// the fitness memory (single port, 2**FMAddrWidth words). Only the host side
// remains: the control-register write port, StartGA, the netlist input
// stream and the result stream (PopOut/PopOutVld/FitnessOut, GADone).
//
// Host protocol: write the eight control registers (one byte per clock with
// CPUWr high), pulse StartGA for one clock, then present (NetNum+1) nets of
// (CMLength+1) words each on NetlistIn, one word per clock with NetlistVld
// high (gaps allowed). When the run ends, PopSiz+1 chromosomes of CMLength+1
// words appear on PopOut, one word per clock with PopOutVld high, the
// chromosome's cut count on FitnessOut, followed by a one-clock GADone.
//
// Memory sizes follow the address widths of the published core; defaults are
// the published generics (8-bit memory words, 256 words per chromosome,
// 256 nets, 256 individuals per population half).
module ga_processor #(
  parameter int FMAddrWidth   = 9,
  parameter int FMDataWidth   = 8,
  parameter int CMDataWidth   = 8,
  parameter int CMField       = 8,
  parameter int MaxNetNumBits = 8
) (
  input  logic                   Clk,
  input  logic                   ResetN,
  input  logic                   CPUWr,
  input  logic [3:0]             CPUAddr,
  input  logic [7:0]             CPUData,
  input  logic                   StartGA,
  input  logic                   NetlistVld,
  input  logic [CMDataWidth-1:0] NetlistIn,
  output logic [CMDataWidth-1:0] PopOut,
  output logic                   PopOutVld,
  output logic [FMDataWidth-1:0] FitnessOut,
  output logic                   GADone
);

  localparam int CMAW = FMAddrWidth + CMField;
  localparam int NMAW = MaxNetNumBits + CMField;

  logic [NMAW-1:0]        NMAddr;
  logic [CMDataWidth-1:0] NMDataWr, NMDataRd;
  logic                   NMWrEnb, NMRdEnb;
  logic [CMAW-1:0]        CMAddrRd, CMAddrWr;
  logic [CMDataWidth-1:0] CMDataRd, CMDataWr;
  logic                   CMRdEnb, CMWrEnb;
  logic [FMAddrWidth-1:0] FMAddr;
  logic [FMDataWidth-1:0] FMDataRd, FMDataWr;
  logic                   FMRdEnb, FMWrEnb;

  ga_core #(
    .FMAddrWidth(FMAddrWidth), .FMDataWidth(FMDataWidth), .CMDataWidth(CMDataWidth),
    .CMField(CMField), .MaxNetNumBits(MaxNetNumBits)
  ) u_core (
    .Clk, .ResetN, .CPUWr, .CPUAddr, .CPUData,
    .StartGA, .NetlistVld, .NetlistIn, .PopOut, .PopOutVld, .FitnessOut, .GADone,
    .NMAddr, .NMDataWr, .NMWrEnb, .NMDataRd, .NMRdEnb,
    .CMAddrRd, .CMDataRd, .CMRdEnb, .CMAddrWr, .CMDataWr, .CMWrEnb,
    .FMAddr, .FMDataRd, .FMRdEnb, .FMDataWr, .FMWrEnb
  );

  sp_ram #(.AddrWidth(NMAW), .DataWidth(CMDataWidth)) u_netlist_mem (
    .Clk, .RdEnb(NMRdEnb), .WrEnb(NMWrEnb), .Addr(NMAddr), .DataWr(NMDataWr), .DataRd(NMDataRd)
  );

  dp_ram #(.AddrWidth(CMAW), .DataWidth(CMDataWidth)) u_chrom_mem (
    .Clk, .RdEnb(CMRdEnb), .WrEnb(CMWrEnb), .AddrRd(CMAddrRd), .AddrWr(CMAddrWr),
    .DataWr(CMDataWr), .DataRd(CMDataRd)
  );

  sp_ram #(.AddrWidth(FMAddrWidth), .DataWidth(FMDataWidth)) u_fitness_mem (
    .Clk, .RdEnb(FMRdEnb), .WrEnb(FMWrEnb), .Addr(FMAddr), .DataWr(FMDataWr), .DataRd(FMDataRd)
  );

endmodule
