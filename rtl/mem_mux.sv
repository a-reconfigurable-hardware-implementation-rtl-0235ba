// mem_mux: memory multiplexer of the GA processor.
//
// Four blocks share the three memories. The block enables from the main
// controller select who drives each memory; at most one of them is high at a
// time, and while none is high the main controller owns all three:
//   netlist memory    fitness block (read) when FitnessActive, else the main
//                     controller (netlist loading, write)
//   chromosome memory read port: crossover block, else fitness block, else
//                     main controller; write port: crossover block, else main
//                     controller
//   fitness memory    selection block (read) when SelectionActive, fitness
//                     block (write) when FitnessActive, else main controller
//                     (read)
// Read data fans out unchanged to every block. Enables of blocks that are not
// selected are masked. Purely combinational.
//
// A shared memory multiplexer steered by the enables is part of the published
// design; the priority among simultaneously high enables is this design's own.
//
// Being a multiplexer, many outputs are plain wires: every block's read-data
// input is the memory's read data, unchanged.
module mem_mux #(
  parameter int FMAddrWidth   = 9,
  parameter int FMDataWidth   = 8,
  parameter int CMDataWidth   = 8,
  parameter int CMField       = 8,
  parameter int MaxNetNumBits = 8
) (
  input  logic                             SelectionActive,
  input  logic                             CrossoverActive,
  input  logic                             FitnessActive,
  // selection block
  input  logic [FMAddrWidth-1:0]           FMAddrRdSM,
  output logic [FMDataWidth-1:0]           FMDataRdSM,
  input  logic                             FMRdEnbSM,
  // crossover block
  input  logic [FMAddrWidth+CMField-1:0]   CMAddrRdCM,
  input  logic [FMAddrWidth+CMField-1:0]   CMAddrWrCM,
  output logic [CMDataWidth-1:0]           CMDataRdCM,
  input  logic [CMDataWidth-1:0]           CMDataWrCM,
  input  logic                             CMRdEnbCM,
  input  logic                             CMWrEnbCM,
  // fitness block
  input  logic [MaxNetNumBits+CMField-1:0] NMAddrRdFM,
  output logic [CMDataWidth-1:0]           NMDataRdFM,
  input  logic                             NMRdEnbFM,
  input  logic [FMAddrWidth+CMField-1:0]   CMAddrRdFM,
  output logic [CMDataWidth-1:0]           CMDataRdFM,
  input  logic                             CMRdEnbFM,
  input  logic [FMAddrWidth-1:0]           FMAddrWrFM,
  input  logic [FMDataWidth-1:0]           FMDataWrFM,
  input  logic                             FMWrEnbFM,
  // main controller
  input  logic [MaxNetNumBits+CMField-1:0] NMAddrWrMC,
  input  logic [CMDataWidth-1:0]           NMDataWrMC,
  input  logic                             NMWrEnbMC,
  input  logic [FMAddrWidth+CMField-1:0]   CMAddrRdMC,
  output logic [CMDataWidth-1:0]           CMDataRdMC,
  input  logic                             CMRdEnbMC,
  input  logic [FMAddrWidth+CMField-1:0]   CMAddrWrMC,
  input  logic [CMDataWidth-1:0]           CMDataWrMC,
  input  logic                             CMWrEnbMC,
  input  logic [FMAddrWidth-1:0]           FMAddrRdMC,
  output logic [FMDataWidth-1:0]           FMDataRdMC,
  input  logic                             FMRdEnbMC,
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

  logic mc_active;
  assign mc_active = !(SelectionActive || CrossoverActive || FitnessActive);

  // Netlist memory.
  assign NMAddr   = FitnessActive ? NMAddrRdFM : NMAddrWrMC;
  assign NMRdEnb  = FitnessActive && NMRdEnbFM;
  assign NMDataWr = NMDataWrMC;
  assign NMWrEnb  = mc_active && NMWrEnbMC;

  // Chromosome memory.
  always_comb begin
    if (CrossoverActive) begin
      CMAddrRd = CMAddrRdCM;
      CMRdEnb  = CMRdEnbCM;
      CMAddrWr = CMAddrWrCM;
      CMDataWr = CMDataWrCM;
      CMWrEnb  = CMWrEnbCM;
    end else if (FitnessActive) begin
      CMAddrRd = CMAddrRdFM;
      CMRdEnb  = CMRdEnbFM;
      CMAddrWr = CMAddrWrMC;
      CMDataWr = CMDataWrMC;
      CMWrEnb  = 1'b0;
    end else begin
      CMAddrRd = CMAddrRdMC;
      CMRdEnb  = CMRdEnbMC && mc_active;
      CMAddrWr = CMAddrWrMC;
      CMDataWr = CMDataWrMC;
      CMWrEnb  = CMWrEnbMC && mc_active;
    end
  end

  // Fitness memory.
  always_comb begin
    FMDataWr = FMDataWrFM;
    if (SelectionActive) begin
      FMAddr  = FMAddrRdSM;
      FMRdEnb = FMRdEnbSM;
      FMWrEnb = 1'b0;
    end else if (FitnessActive) begin
      FMAddr  = FMAddrWrFM;
      FMRdEnb = 1'b0;
      FMWrEnb = FMWrEnbFM;
    end else begin
      FMAddr  = FMAddrRdMC;
      FMRdEnb = FMRdEnbMC && mc_active;
      FMWrEnb = 1'b0;
    end
  end

  // Read data goes to every block.
  assign FMDataRdSM = FMDataRd;
  assign FMDataRdMC = FMDataRd;
  assign CMDataRdCM = CMDataRd;
  assign CMDataRdFM = CMDataRd;
  assign CMDataRdMC = CMDataRd;
  assign NMDataRdFM = NMDataRd;

endmodule
