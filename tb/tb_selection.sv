// tb_selection: tournament selection against a fitness-memory model.
//
// The fitness memory holds random fitness values in both halves. For 300
// selections (random population sizes, both HighBank values) the testbench
// records the four fitness reads the block makes and checks that: they all
// address the parent half, the indices lie in 0..PopSiz, Parent1Addr is the
// better (smaller fitness, first on a tie) of reads 1 and 2, Parent2Addr the
// better of reads 3 and 4, SelectionDone comes 9 clocks after the enable is
// seen, and the parents hold while the block is idle.
module tb_selection;
  localparam int AW = 9, DW = 8;
  logic Clk = 0, ResetN = 0;
  logic [7:0] PopSiz;
  logic SelectionEnb = 0, HighBank = 0, SelectionDone;
  logic [AW-2:0] Parent1Addr, Parent2Addr;
  logic [AW-1:0] FMAddrRd;
  logic [DW-1:0] FMDataRd;
  logic FMRdEnb;
  logic [DW-1:0] fmem [2**AW];
  logic [AW-1:0] rd_addr [$];
  int checks = 0, failures = 0;

  selection #(.FMAddrWidth(AW), .FMDataWidth(DW)) dut (.*);

  always #5 Clk = ~Clk;
  always @(posedge Clk) if (FMRdEnb) begin
    FMDataRd <= fmem[FMAddrRd];
    rd_addr.push_back(FMAddrRd);
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [AW-2:0] best(input logic [AW-1:0] a, input logic [AW-1:0] b);
    return (fmem[b] < fmem[a]) ? b[AW-2:0] : a[AW-2:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    foreach (fmem[i]) fmem[i] = DW'($urandom % 40);   // many ties
    PopSiz = 8'd19;
    FMDataRd = '0;
    repeat (2) @(posedge Clk);
    ResetN = 1;
    for (int n = 0; n < 300; n++) begin
      PopSiz   = (n < 100) ? 8'd19 : 8'($urandom);
      HighBank = 1'($urandom);
      rd_addr.delete();
      @(negedge Clk); SelectionEnb = 1;
      cyc = 0;
      do begin @(posedge Clk); #1 cyc++; end while (!SelectionDone);
      check(cyc == 9, $sformatf("done latency %0d", cyc));
      @(negedge Clk); SelectionEnb = 0;
      check(rd_addr.size() == 4, "four reads");
      if (rd_addr.size() == 4) begin
        foreach (rd_addr[i]) begin
          check(rd_addr[i][AW-1] == HighBank, "bank bit");
          check(rd_addr[i][AW-2:0] <= PopSiz, "index range");
        end
        check(Parent1Addr == best(rd_addr[0], rd_addr[1]), "parent1 winner");
        check(Parent2Addr == best(rd_addr[2], rd_addr[3]), "parent2 winner");
      end
      begin
        automatic logic [AW-2:0] p1 = Parent1Addr, p2 = Parent2Addr;
        repeat (3) @(negedge Clk);
        check(Parent1Addr == p1 && Parent2Addr == p2, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
