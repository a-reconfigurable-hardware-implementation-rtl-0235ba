// sp_ram: single address port synchronous RAM.
//
// Used as the netlist memory and as the fitness memory of the GA processor.
// One address bus serves both operations: on a rising edge with WrEnb high,
// DataWr is stored at Addr; on a rising edge with RdEnb high, the word at Addr
// is registered onto DataRd, so read data is valid from the clock after the
// read was requested and is held until the next read. A write and a read in
// the same cycle return the old contents. The array has 2**AddrWidth words and
// maps onto FPGA block RAM.
//
// The single port, synchronous behaviour and one-cycle read latency follow
// the published memory timing; the contents are not reset.
module sp_ram #(
  parameter int AddrWidth = 9,
  parameter int DataWidth = 8
) (
  input  logic                 Clk,
  input  logic                 RdEnb,
  input  logic                 WrEnb,
  input  logic [AddrWidth-1:0] Addr,
  input  logic [DataWidth-1:0] DataWr,
  output logic [DataWidth-1:0] DataRd
);

  logic [DataWidth-1:0] mem [2**AddrWidth];

  always_ff @(posedge Clk) begin
    if (WrEnb) mem[Addr] <= DataWr;
    if (RdEnb) DataRd    <= mem[Addr];
  end

endmodule
