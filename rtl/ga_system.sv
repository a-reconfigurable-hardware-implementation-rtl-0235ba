// ga_system: the GA partitioning processor as placed on the logic-module
// FPGA of a prototyping board.
//
// Four blocks: the GA processor with its on-chip memories, the GA controller
// that feeds it from the board's SSRAM and stores its results there, the
// multiplexer that hands the SSRAM port either to the system-bus side or to
// the GA controller, and the GA-enable bit of the register peripheral. The
// rest of the system-bus side (bus slave logic, address decoder, SSRAM
// controller, interrupt controller) and the SSRAM chip itself are outside
// this module; their signals are the ports below.
//
// Operation: with EnbGACtl low the bus side writes the eight GA parameters
// (one per word, low byte, at word addresses 0..7) and the netlist (one
// netlist word per SSRAM word, from word 0x100) into the SSRAM. A host write
// of 1 to the enable bit (CtlWr with CtlWrData = 1) sets EnbGACtl, which
// hands the SSRAM to the GA controller. The GA controller loads the
// processor, runs it and writes PopSiz+1 chromosomes of CMLength+1 words
// from word 0x20000 upwards, each SSRAM word holding {fitness, chromosome
// word}. It then pulses GACtlReset for one clock, which clears EnbGACtl on
// the next edge. The host polls EnbGACtl and reads the results once it is 0.
//
// SSRAM port: word address, 32-bit data, byte enables, read and write
// strobes, read data ZbtRdLatency clocks after the read strobe. The block
// split and the EnbGACtl/GACtlReset handshake follow the document; the SSRAM
// layout and port details are this design's own.
module ga_system #(
  parameter int FMAddrWidth   = 9,
  parameter int FMDataWidth   = 8,
  parameter int CMDataWidth   = 8,
  parameter int CMField       = 8,
  parameter int MaxNetNumBits = 8,
  parameter int ZbtAddrWidth  = 18,
  parameter int ZbtDataWidth  = 32,
  parameter int ZbtRdLatency  = 2
) (
  input  logic                      Clk,
  input  logic                      ResetN,
  // host access to the GA-enable bit, and the bit's clear request
  input  logic                      CtlWr,
  input  logic                      CtlWrData,
  output logic                      EnbGACtl,
  output logic                      GACtlReset,
  // bus-side SSRAM access
  input  logic [ZbtAddrWidth-1:0]   BusAddr,
  input  logic [ZbtDataWidth-1:0]   BusWrData,
  input  logic [ZbtDataWidth/8-1:0] BusByteEnb,
  input  logic                      BusWr,
  input  logic                      BusRd,
  output logic [ZbtDataWidth-1:0]   BusRdData,
  // SSRAM chip
  output logic [ZbtAddrWidth-1:0]   ZbtAddr,
  output logic [ZbtDataWidth-1:0]   ZbtWrData,
  output logic [ZbtDataWidth/8-1:0] ZbtByteEnb,
  output logic                      ZbtWr,
  output logic                      ZbtRd,
  input  logic [ZbtDataWidth-1:0]   ZbtRdData
);

  logic                    CPUWr, StartGA, NetlistVld, PopOutVld, GADone;
  logic [3:0]              CPUAddr;
  logic [7:0]              CPUData;
  logic [CMDataWidth-1:0]  NetlistIn, PopOut;
  logic [FMDataWidth-1:0]  FitnessOut;
  logic [ZbtAddrWidth-1:0] GaAddr;
  logic [ZbtDataWidth-1:0] GaWrData, GaRdData;
  logic                    GaWr, GaRd;

  ga_processor #(
    .FMAddrWidth(FMAddrWidth), .FMDataWidth(FMDataWidth), .CMDataWidth(CMDataWidth),
    .CMField(CMField), .MaxNetNumBits(MaxNetNumBits)
  ) u_gap (
    .Clk, .ResetN, .CPUWr, .CPUAddr, .CPUData, .StartGA, .NetlistVld, .NetlistIn,
    .PopOut, .PopOutVld, .FitnessOut, .GADone
  );

  ga_controller #(
    .CMDataWidth(CMDataWidth), .FMDataWidth(FMDataWidth), .CMField(CMField),
    .MaxNetNumBits(MaxNetNumBits), .ZbtAddrWidth(ZbtAddrWidth),
    .ZbtDataWidth(ZbtDataWidth), .ZbtRdLatency(ZbtRdLatency)
  ) u_gactl (
    .Clk, .ResetN, .EnbGACtl, .GACtlReset,
    .ZbtAddr(GaAddr), .ZbtWrData(GaWrData), .ZbtWr(GaWr), .ZbtRd(GaRd), .ZbtRdData(GaRdData),
    .CPUWr, .CPUAddr, .CPUData, .StartGA, .NetlistVld, .NetlistIn,
    .PopOut, .PopOutVld, .FitnessOut, .GADone
  );

  ga_ctl_reg u_ctlreg (
    .Clk, .ResetN, .CtlWr, .CtlWrData, .GACtlReset, .EnbGACtl
  );

  zbt_mux #(.ZbtAddrWidth(ZbtAddrWidth), .ZbtDataWidth(ZbtDataWidth)) u_zmux (
    .EnbGACtl,
    .BusAddr, .BusWrData, .BusByteEnb, .BusWr, .BusRd, .BusRdData,
    .GaAddr, .GaWrData, .GaWr, .GaRd, .GaRdData,
    .ZbtAddr, .ZbtWrData, .ZbtByteEnb, .ZbtWr, .ZbtRd, .ZbtRdData
  );

endmodule
