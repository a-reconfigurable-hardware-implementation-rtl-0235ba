// tb_zbt_mux: random stimulus on both sides of the SSRAM multiplexer.
//
// For each random input vector the testbench computes which side owns the
// SSRAM (the GA controller when EnbGACtl is high, the bus side otherwise) and
// checks every SSRAM-side output, that GA-controller writes use all byte
// enables, and that read data reaches only the owning side.
module tb_zbt_mux;
  localparam int AW = 18, DW = 32;
  logic EnbGACtl;
  logic [AW-1:0] BusAddr, GaAddr, ZbtAddr;
  logic [DW-1:0] BusWrData, GaWrData, ZbtWrData, BusRdData, GaRdData, ZbtRdData;
  logic [DW/8-1:0] BusByteEnb, ZbtByteEnb;
  logic BusWr, BusRd, GaWr, GaRd, ZbtWr, ZbtRd;
  int checks = 0, failures = 0;

  zbt_mux dut (.*);

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      EnbGACtl   = 1'($urandom);
      BusAddr    = AW'($urandom); GaAddr = AW'($urandom);
      BusWrData  = $urandom;      GaWrData = $urandom;  ZbtRdData = $urandom;
      BusByteEnb = 4'($urandom);
      {BusWr, BusRd, GaWr, GaRd} = 4'($urandom);
      #1;
      if (EnbGACtl) begin
        check(ZbtAddr == GaAddr && ZbtWrData == GaWrData, "GA side address/data");
        check(ZbtWr == GaWr && ZbtRd == GaRd, "GA side strobes");
        check(ZbtByteEnb == 4'hF, "GA side writes whole words");
        check(GaRdData == ZbtRdData && BusRdData == '0, "read data to GA side only");
      end else begin
        check(ZbtAddr == BusAddr && ZbtWrData == BusWrData, "bus side address/data");
        check(ZbtWr == BusWr && ZbtRd == BusRd, "bus side strobes");
        check(ZbtByteEnb == BusByteEnb, "bus side byte enables");
        check(BusRdData == ZbtRdData && GaRdData == '0, "read data to bus side only");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
