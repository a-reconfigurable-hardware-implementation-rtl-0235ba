// tb_control_regs: writes every control register through the CPU port and
// checks the register outputs, the reset values, that writes with CPUWr low
// and writes to unmapped addresses change nothing, and that a write takes
// effect at the clock edge that samples it.
module tb_control_regs;
  logic Clk = 0, ResetN = 0, CPUWr = 0;
  logic [3:0] CPUAddr = 0;
  logic [7:0] CPUData = 0;
  logic [7:0] CMLength, NetNum, PopSiz, GenNum, CrossoverRate, MutationRate;
  int checks = 0, failures = 0;
  logic [7:0] exp_r [8];

  control_regs #(.CMField(8), .MaxNetNumBits(8)) dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge Clk); CPUWr = 1; CPUAddr = a; CPUData = d;
    @(negedge Clk); CPUWr = 0;
  endtask

  task automatic check_all(input string tag);
    check(CMLength == exp_r[0], {tag, " CMLength"});
    check(NetNum == exp_r[2], {tag, " NetNum"});
    check(PopSiz == exp_r[4], {tag, " PopSiz"});
    check(GenNum == exp_r[5], {tag, " GenNum"});
    check(CrossoverRate == exp_r[6], {tag, " CrossoverRate"});
    check(MutationRate == exp_r[7], {tag, " MutationRate"});
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (exp_r[i]) exp_r[i] = 0;
    repeat (2) @(posedge Clk);
    ResetN = 1;
    #1 check_all("reset");
    for (int round = 0; round < 20; round++) begin
      for (int a = 0; a < 8; a++) begin
        automatic logic [7:0] d = 8'($urandom);
        wr(4'(a), d);
        exp_r[a] = d;
        check_all($sformatf("after write %0d", a));
      end
      // CPUWr low: no change
      @(negedge Clk); CPUAddr = 4'(round % 8); CPUData = ~exp_r[round % 8];
      @(negedge Clk);
      check_all("no write");
      // unmapped addresses
      for (int a = 8; a < 16; a++) wr(4'(a), 8'($urandom));
      check_all("unmapped");
    end
    // the write lands at the sampling edge, not before
    @(negedge Clk); CPUWr = 1; CPUAddr = 4'h4; CPUData = ~exp_r[4];
    #2 check(PopSiz == exp_r[4], "before edge");
    @(posedge Clk); #1 check(PopSiz == ~exp_r[4], "after edge");
    CPUWr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
