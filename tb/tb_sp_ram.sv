// tb_sp_ram: random writes and reads of the single-port RAM against an
// associative-array model; checks one-cycle read latency, that read data is
// held while RdEnb is low, and read-before-write on a same-cycle access.
module tb_sp_ram;
  localparam int AW = 9, DW = 8;
  logic Clk = 0, RdEnb = 0, WrEnb = 0;
  logic [AW-1:0] Addr = 0;
  logic [DW-1:0] DataWr = 0, DataRd;
  logic [DW-1:0] model [logic [AW-1:0]];
  int checks = 0, failures = 0;

  sp_ram #(.AddrWidth(AW), .DataWidth(DW)) dut (.*);

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
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge Clk); WrEnb = 1; Addr = AW'(i); DataWr = DW'($urandom); model[AW'(i)] = DataWr;
    end
    @(negedge Clk); WrEnb = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [AW-1:0] a = AW'($urandom);
      logic [DW-1:0] expv;
      @(negedge Clk);
      Addr = a; RdEnb = 1; expv = model[a];
      WrEnb = ($urandom % 3 == 0); DataWr = DW'($urandom);
      if (WrEnb) model[a] = DataWr;
      @(negedge Clk);
      RdEnb = 0; WrEnb = 0;
      check(DataRd == expv, $sformatf("read %0d", a));
      Addr = AW'($urandom);
      @(negedge Clk);
      check(DataRd == expv, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
