// dp_ram: dual address port synchronous RAM (one write port, one read port).
//
// Used as the chromosome memory of the GA processor, which holds the parent
// population in one half and the child population in the other. On a rising
// edge with WrEnb high, DataWr is stored at AddrWr; on a rising edge with RdEnb
// high, the word at AddrRd is registered onto DataRd (valid from the next
// clock, held until the next read). Reading the address being written in the
// same cycle returns the old word. 2**AddrWidth words, FPGA block RAM.
//
// Port structure and one-cycle read latency follow the published memory
// timing; the contents are not reset.
module dp_ram #(
  parameter int AddrWidth = 17,
  parameter int DataWidth = 8
) (
  input  logic                 Clk,
  input  logic                 RdEnb,
  input  logic                 WrEnb,
  input  logic [AddrWidth-1:0] AddrRd,
  input  logic [AddrWidth-1:0] AddrWr,
  input  logic [DataWidth-1:0] DataWr,
  output logic [DataWidth-1:0] DataRd
);

  logic [DataWidth-1:0] mem [2**AddrWidth];

  always_ff @(posedge Clk) begin
    if (WrEnb) mem[AddrWr] <= DataWr;
    if (RdEnb) DataRd      <= mem[AddrRd];
  end

endmodule
