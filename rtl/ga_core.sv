// ga_core: genetic-algorithm processor core for two-way circuit partitioning.
//
// The core searches for a split of a circuit's cells into two halves that
// cuts as few nets as possible. A host programs the control registers
// (CPUWr/CPUAddr/CPUData), pulses StartGA and streams the netlist in on
// NetlistIn/NetlistVld; the core then runs a generational genetic algorithm
// (random initial population, tournament selection, uniform crossover,
// mutation, balance repair, elitism, cut-count fitness) and streams the final
// population out on PopOut/PopOutVld with each chromosome's fitness on
// FitnessOut, ending with a GADone pulse.
//
// Inside are the control registers, the selection, crossover/mutation and
// fitness blocks, the main controller that sequences them with enable/done
// handshakes, and the memory multiplexer. The three memories are outside the
// core, on the ports below, as synchronous RAMs with one cycle of read latency:
//   netlist memory     2**(MaxNetNumBits+CMField) x CMDataWidth, single port
//   chromosome memory  2**(FMAddrWidth+CMField) x CMDataWidth, one read and
//                      one write port; two halves (parents / children)
//   fitness memory     2**FMAddrWidth x FMDataWidth, single port
//
// The partition into blocks, the port list and the parameter defaults follow
// the published core (CMField = 8 as in its table of generics).
//
// Two output buses are plain wires by design: PopOut is the chromosome
// memory's read data and NMDataWr is NetlistIn.
module ga_core #(
  parameter int FMAddrWidth   = 9,
  parameter int FMDataWidth   = 8,
  parameter int CMDataWidth   = 8,
  parameter int CMField       = 8,
  parameter int MaxNetNumBits = 8
) (
  input  logic                             Clk,
  input  logic                             ResetN,
  // CPU interface
  input  logic                             CPUWr,
  input  logic [3:0]                       CPUAddr,
  input  logic [7:0]                       CPUData,
  // data and control
  input  logic                             StartGA,
  input  logic                             NetlistVld,
  input  logic [CMDataWidth-1:0]           NetlistIn,
  output logic [CMDataWidth-1:0]           PopOut,
  output logic                             PopOutVld,
  output logic [FMDataWidth-1:0]           FitnessOut,
  output logic                             GADone,
  // netlist memory
  output logic [MaxNetNumBits+CMField-1:0] NMAddr,
  output logic [CMDataWidth-1:0]           NMDataWr,
  output logic                             NMWrEnb,
  input  logic [CMDataWidth-1:0]           NMDataRd,
  output logic                             NMRdEnb,
  // chromosome memory
  output logic [FMAddrWidth+CMField-1:0]   CMAddrRd,
  input  logic [CMDataWidth-1:0]           CMDataRd,
  output logic                             CMRdEnb,
  output logic [FMAddrWidth+CMField-1:0]   CMAddrWr,
  output logic [CMDataWidth-1:0]           CMDataWr,
  output logic                             CMWrEnb,
  // fitness memory
  output logic [FMAddrWidth-1:0]           FMAddr,
  input  logic [FMDataWidth-1:0]           FMDataRd,
  output logic                             FMRdEnb,
  output logic [FMDataWidth-1:0]           FMDataWr,
  output logic                             FMWrEnb
);

  localparam int CMAW = FMAddrWidth + CMField;
  localparam int NMAW = MaxNetNumBits + CMField;

  // control registers
  logic [CMField-1:0]       CMLength;
  logic [MaxNetNumBits-1:0] NetNum;
  logic [7:0]               PopSiz, GenNum, CrossoverRate, MutationRate;

  // handshakes
  logic SelectionEnb, SelectionDone, CrossoverEnb, CrossoverDone;
  logic FitnessEnb, FitnessDone, HighBank;
  logic [FMAddrWidth-2:0] Parent1Addr, Parent2Addr, Child1Addr, Child2Addr, BestAddr;
  logic [FMDataWidth-1:0] BestFitness;

  // per-block memory signals
  logic [FMAddrWidth-1:0] FMAddrRdSM, FMAddrWrFM, FMAddrRdMC;
  logic [FMDataWidth-1:0] FMDataRdSM, FMDataWrFM, FMDataRdMC;
  logic                   FMRdEnbSM, FMWrEnbFM, FMRdEnbMC;
  logic [CMAW-1:0]        CMAddrRdCM, CMAddrWrCM, CMAddrRdFM, CMAddrRdMC, CMAddrWrMC;
  logic [CMDataWidth-1:0] CMDataRdCM, CMDataWrCM, CMDataRdFM, CMDataRdMC, CMDataWrMC;
  logic                   CMRdEnbCM, CMWrEnbCM, CMRdEnbFM, CMRdEnbMC, CMWrEnbMC;
  logic [NMAW-1:0]        NMAddrRdFM, NMAddrWrMC;
  logic [CMDataWidth-1:0] NMDataRdFM, NMDataWrMC;
  logic                   NMRdEnbFM, NMWrEnbMC;

  control_regs #(.CMField(CMField), .MaxNetNumBits(MaxNetNumBits)) u_regs (
    .Clk, .ResetN, .CPUWr, .CPUAddr, .CPUData,
    .CMLength, .NetNum, .PopSiz, .GenNum, .CrossoverRate, .MutationRate
  );

  selection #(.FMAddrWidth(FMAddrWidth), .FMDataWidth(FMDataWidth)) u_selection (
    .Clk, .ResetN, .PopSiz, .SelectionEnb, .HighBank, .SelectionDone,
    .Parent1Addr, .Parent2Addr,
    .FMAddrRd(FMAddrRdSM), .FMDataRd(FMDataRdSM), .FMRdEnb(FMRdEnbSM)
  );

  crossover #(.FMAddrWidth(FMAddrWidth), .CMDataWidth(CMDataWidth), .CMField(CMField)) u_crossover (
    .Clk, .ResetN, .CrossoverRate, .MutationRate, .CMLength,
    .CrossoverEnb, .CrossoverDone, .HighBank,
    .Parent1Addr, .Parent2Addr, .Child1Addr, .Child2Addr,
    .CMAddrRd(CMAddrRdCM), .CMDataRd(CMDataRdCM), .CMRdEnb(CMRdEnbCM),
    .CMAddrWr(CMAddrWrCM), .CMDataWr(CMDataWrCM), .CMWrEnb(CMWrEnbCM)
  );

  fitness #(
    .FMAddrWidth(FMAddrWidth), .FMDataWidth(FMDataWidth), .CMDataWidth(CMDataWidth),
    .CMField(CMField), .MaxNetNumBits(MaxNetNumBits)
  ) u_fitness (
    .Clk, .ResetN, .NetNum, .PopSiz, .CMLength, .FitnessEnb, .FitnessDone, .HighBank,
    .CMAddrRd(CMAddrRdFM), .CMDataRd(CMDataRdFM), .CMRdEnb(CMRdEnbFM),
    .NMAddr(NMAddrRdFM), .NMDataRd(NMDataRdFM), .NMRdEnb(NMRdEnbFM),
    .FMAddr(FMAddrWrFM), .FMDataWr(FMDataWrFM), .FMWrEnb(FMWrEnbFM),
    .BestAddr, .BestFitness
  );

  main_controller #(
    .FMAddrWidth(FMAddrWidth), .FMDataWidth(FMDataWidth), .CMDataWidth(CMDataWidth),
    .CMField(CMField), .MaxNetNumBits(MaxNetNumBits)
  ) u_main (
    .Clk, .ResetN, .StartGA, .NetlistVld, .NetlistIn,
    .PopOut, .PopOutVld, .FitnessOut, .GADone,
    .CMLength, .NetNum, .PopSiz, .GenNum,
    .SelectionEnb, .SelectionDone, .CrossoverEnb, .CrossoverDone,
    .Child1Addr, .Child2Addr, .FitnessEnb, .FitnessDone, .BestAddr, .HighBank,
    .NMAddrWr(NMAddrWrMC), .NMDataWr(NMDataWrMC), .NMWrEnb(NMWrEnbMC),
    .CMAddrRd(CMAddrRdMC), .CMDataRd(CMDataRdMC), .CMRdEnb(CMRdEnbMC),
    .CMAddrWr(CMAddrWrMC), .CMDataWr(CMDataWrMC), .CMWrEnb(CMWrEnbMC),
    .FMAddrRd(FMAddrRdMC), .FMDataRd(FMDataRdMC), .FMRdEnb(FMRdEnbMC)
  );

  mem_mux #(
    .FMAddrWidth(FMAddrWidth), .FMDataWidth(FMDataWidth), .CMDataWidth(CMDataWidth),
    .CMField(CMField), .MaxNetNumBits(MaxNetNumBits)
  ) u_mux (
    .SelectionActive(SelectionEnb), .CrossoverActive(CrossoverEnb), .FitnessActive(FitnessEnb),
    .FMAddrRdSM, .FMDataRdSM, .FMRdEnbSM,
    .CMAddrRdCM, .CMAddrWrCM, .CMDataRdCM, .CMDataWrCM, .CMRdEnbCM, .CMWrEnbCM,
    .NMAddrRdFM, .NMDataRdFM, .NMRdEnbFM, .CMAddrRdFM, .CMDataRdFM, .CMRdEnbFM,
    .FMAddrWrFM, .FMDataWrFM, .FMWrEnbFM,
    .NMAddrWrMC, .NMDataWrMC, .NMWrEnbMC, .CMAddrRdMC, .CMDataRdMC, .CMRdEnbMC,
    .CMAddrWrMC, .CMDataWrMC, .CMWrEnbMC, .FMAddrRdMC, .FMDataRdMC, .FMRdEnbMC,
    .NMAddr, .NMDataWr, .NMWrEnb, .NMDataRd, .NMRdEnb,
    .CMAddrRd, .CMDataRd, .CMRdEnb, .CMAddrWr, .CMDataWr, .CMWrEnb,
    .FMAddr, .FMDataRd, .FMRdEnb, .FMDataWr, .FMWrEnb
  );

  // The enables steer the memory multiplexer: never more than one at a time.
  assert property (@(posedge Clk) disable iff (!ResetN)
    $onehot0({SelectionEnb, CrossoverEnb, FitnessEnb}));

endmodule
