// tb_ga_controller: the GA controller between a model SSRAM and a model GA
// processor.
//
// The SSRAM model returns read data two clocks after the read strobe. The
// processor model records control-register writes, StartGA and netlist words,
// and once the whole netlist has arrived streams out a random "population"
// (random words and fitness values, with random gaps) followed by GADone.
// For several problem sizes the testbench checks:
//  - the eight parameter words are written to register addresses 0..7 with
//    the low byte of SSRAM words 0..7, before StartGA;
//  - exactly one StartGA pulse per run;
//  - the netlist words arrive in SSRAM order, one per clock without gaps,
//    (NetNum+1)*(CMLength+1) of them;
//  - every output word is stored at 0x20000 + n as {fitness, word};
//  - one GACtlReset pulse after GADone, no SSRAM access while EnbGACtl is
//    low, and a new run starts only after EnbGACtl has been low.
module tb_ga_controller;
  localparam int W = 8, FDW = 8, AW = 18, DW = 32;
  logic Clk = 0, ResetN = 0;
  logic EnbGACtl = 0, GACtlReset;
  logic [AW-1:0] ZbtAddr;
  logic [DW-1:0] ZbtWrData, ZbtRdData;
  logic ZbtWr, ZbtRd;
  logic CPUWr, StartGA, NetlistVld;
  logic [3:0] CPUAddr;
  logic [7:0] CPUData;
  logic [W-1:0] NetlistIn, PopOut = 0;
  logic PopOutVld = 0, GADone = 0;
  logic [FDW-1:0] FitnessOut = 0;
  int checks = 0, failures = 0;

  ga_controller dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // SSRAM model, two clocks of read latency
  logic [DW-1:0] zbt [2**AW];
  logic [DW-1:0] rd1, rd2;
  always_ff @(posedge Clk) begin
    if (ZbtRd) rd1 <= zbt[ZbtAddr];
    rd2 <= rd1;
    if (ZbtWr) zbt[ZbtAddr] <= ZbtWrData;
  end
  assign ZbtRdData = rd2;

  // processor model: logs the host-side traffic
  logic [7:0] regs_seen [8];
  int reg_writes, starts, net_words, net_gaps, idle_access, resets;
  bit started, net_started;
  logic [W-1:0] net_log [$];
  always @(posedge Clk) if (ResetN) begin
    if (CPUWr) begin
      reg_writes++;
      regs_seen[CPUAddr[2:0]] = CPUData;
      check(!started, "register write before StartGA");
    end
    if (StartGA) begin starts++; started = 1; end
    if (NetlistVld) begin
      net_log.push_back(NetlistIn); net_started = 1;
    end else if (net_started && net_log.size() < net_words) net_gaps++;
    if (!EnbGACtl && (ZbtRd || ZbtWr)) idle_access++;
    if (GACtlReset) resets++;
  end

  task automatic run(input int L, input int nets, input int pop);
    logic [W-1:0] outw [$];
    logic [FDW-1:0] outf [$];
    int cyc = 0;
    logic [7:0] rv [8];
    rv = '{8'(L - 1), 8'((L - 1) >> 8), 8'(nets - 1), 8'((nets - 1) >> 8),
           8'(pop - 1), 8'($urandom), 8'($urandom), 8'($urandom)};
    for (int i = 0; i < 8; i++) zbt[i] = {24'($urandom), rv[i]};
    for (int i = 0; i < L * nets; i++) zbt['h100 + i] = $urandom;
    reg_writes = 0; starts = 0; started = 0; net_started = 0; net_gaps = 0; resets = 0;
    net_log.delete(); net_words = L * nets;
    @(negedge Clk); EnbGACtl = 1;
    while (net_log.size() < L * nets && cyc < 200000) begin @(posedge Clk); cyc++; end
    check(reg_writes == 8, $sformatf("eight register writes (%0d)", reg_writes));
    for (int i = 0; i < 8; i++) check(regs_seen[i] == rv[i], $sformatf("register %0d value", i));
    check(starts == 1, "one StartGA");
    check(net_log.size() == L * nets, "netlist word count");
    check(net_gaps == 0, "netlist streamed without gaps");
    for (int i = 0; i < net_log.size(); i++)
      check(net_log[i] == zbt['h100 + i][W-1:0], $sformatf("netlist word %0d", i));
    // population output
    repeat (10) @(negedge Clk);
    check(net_log.size() == L * nets, "no netlist words after the last one");
    for (int i = 0; i < pop * L; i++) begin
      while ($urandom % 4 == 0) begin PopOutVld = 0; @(negedge Clk); end
      PopOutVld = 1; PopOut = W'($urandom); FitnessOut = FDW'($urandom);
      outw.push_back(PopOut); outf.push_back(FitnessOut);
      @(negedge Clk);
    end
    PopOutVld = 0; GADone = 1; @(negedge Clk); GADone = 0;
    repeat (5) @(negedge Clk);
    check(resets == 1, "one GACtlReset pulse");
    for (int i = 0; i < pop * L; i++)
      check(zbt['h20000 + i] == {16'h0, outf[i], outw[i]}, $sformatf("stored output %0d", i));
    // EnbGACtl still high: the controller must not start again
    repeat (20) @(negedge Clk);
    check(starts == 1 && reg_writes == 8, "no restart while EnbGACtl stays high");
    EnbGACtl = 0;
    repeat (3) @(negedge Clk);
  endtask

  initial begin
    repeat (3) @(posedge Clk);
    #1 ResetN = 1;
    repeat (5) @(negedge Clk);
    run(2, 9, 20);
    run(4, 32, 16);
    run(1, 1, 1);
    run(35, 239, 20);
    check(idle_access == 0, "no SSRAM access while EnbGACtl is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
