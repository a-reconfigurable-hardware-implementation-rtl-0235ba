// tb_dp_ram: simultaneous random writes (write port) and reads (read port) of
// the dual-port RAM against a model; checks one-cycle read latency, hold when
// RdEnb is low and old data on a same-address read/write.
module tb_dp_ram;
  localparam int AW = 17, DW = 8;
  logic Clk = 0, RdEnb = 0, WrEnb = 0;
  logic [AW-1:0] AddrRd = 0, AddrWr = 0;
  logic [DW-1:0] DataWr = 0, DataRd;
  logic [DW-1:0] model [logic [AW-1:0]];
  logic [AW-1:0] used [$];
  int checks = 0, failures = 0;

  dp_ram #(.AddrWidth(AW), .DataWidth(DW)) dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge Clk); WrEnb = 1; AddrWr = AW'($urandom); DataWr = DW'($urandom);
      model[AddrWr] = DataWr; used.push_back(AddrWr);
    end
    @(negedge Clk); WrEnb = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [AW-1:0] a = used[$urandom % used.size()];
      automatic logic [DW-1:0] expv = model[a];
      @(negedge Clk);
      AddrRd = a; RdEnb = 1;
      WrEnb = 1; AddrWr = ($urandom % 2 != 0) ? a : used[$urandom % used.size()]; DataWr = DW'($urandom);
      model[AddrWr] = DataWr;
      @(negedge Clk);
      RdEnb = 0; WrEnb = 0;
      check(DataRd == expv, $sformatf("read %0d", a));
      @(negedge Clk);
      check(DataRd == expv, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
