// zbt_mux: shares the board's SSRAM between the bus side and the GA
// controller.
//
// When EnbGACtl is high the GA controller drives the SSRAM address, write
// data, byte enables and read/write strobes; otherwise the bus-side SSRAM
// controller does. Read data from the SSRAM is returned to the side that owns
// the port and held at zero towards the other, so neither side sees the
// other's traffic. The GA controller always writes whole words (all byte
// enables set). Purely combinational: it adds no clock of latency.
//
// Selecting on EnbGACtl follows the document; the byte enables, the zeroed
// read data on the idle side and the signal names are this design's own.
module zbt_mux #(
  parameter int ZbtAddrWidth = 18,
  parameter int ZbtDataWidth = 32
) (
  input  logic                      EnbGACtl,
  // bus side (SSRAM controller on the system bus)
  input  logic [ZbtAddrWidth-1:0]   BusAddr,
  input  logic [ZbtDataWidth-1:0]   BusWrData,
  input  logic [ZbtDataWidth/8-1:0] BusByteEnb,
  input  logic                      BusWr,
  input  logic                      BusRd,
  output logic [ZbtDataWidth-1:0]   BusRdData,
  // GA controller side
  input  logic [ZbtAddrWidth-1:0]   GaAddr,
  input  logic [ZbtDataWidth-1:0]   GaWrData,
  input  logic                      GaWr,
  input  logic                      GaRd,
  output logic [ZbtDataWidth-1:0]   GaRdData,
  // SSRAM
  output logic [ZbtAddrWidth-1:0]   ZbtAddr,
  output logic [ZbtDataWidth-1:0]   ZbtWrData,
  output logic [ZbtDataWidth/8-1:0] ZbtByteEnb,
  output logic                      ZbtWr,
  output logic                      ZbtRd,
  input  logic [ZbtDataWidth-1:0]   ZbtRdData
);

  always_comb begin
    if (EnbGACtl) begin
      ZbtAddr    = GaAddr;
      ZbtWrData  = GaWrData;
      ZbtByteEnb = '1;
      ZbtWr      = GaWr;
      ZbtRd      = GaRd;
      GaRdData   = ZbtRdData;
      BusRdData  = '0;
    end else begin
      ZbtAddr    = BusAddr;
      ZbtWrData  = BusWrData;
      ZbtByteEnb = BusByteEnb;
      ZbtWr      = BusWr;
      ZbtRd      = BusRd;
      GaRdData   = '0;
      BusRdData  = ZbtRdData;
    end
  end

endmodule
