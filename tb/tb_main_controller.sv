// tb_main_controller: sequencing of the main controller.
//
// The selection, crossover and fitness blocks are replaced by small
// behavioural responders: each waits a few clocks after its enable rises and
// pulses its done signal; the crossover responder writes random child words
// into the child half, the fitness responder writes random fitness values and
// picks a random best index. Memories are testbench arrays with one cycle of
// read latency. For several problem sizes the testbench checks:
//  - the netlist words (sent with random gaps in NetlistVld) land at {net, word};
//  - the initial population fills exactly slots 0..PopSiz of the low half,
//    and every initial chromosome is balanced;
//  - the phase order is fitness, then per generation (selection, crossover)
//    x ceil((PopSiz+1)/2) with child slots 2k/2k+1, then fitness; GenNum+1
//    generations; enables one at a time, each dropped right after its done;
//  - HighBank flips between fitness phases;
//  - the last child slot holds a copy of the best parent (elitism);
//  - the output stream gives every word of every final chromosome in order
//    with the chromosome's fitness, followed by exactly one GADone.
module tb_main_controller;
  localparam int FAW = 9, FDW = 8, W = 8, CF = 8, NB = 8;
  logic Clk = 0, ResetN = 0;
  logic StartGA = 0, NetlistVld = 0;
  logic [W-1:0] NetlistIn = 0, PopOut;
  logic PopOutVld, GADone;
  logic [FDW-1:0] FitnessOut;
  logic [CF-1:0] CMLength;
  logic [NB-1:0] NetNum;
  logic [7:0] PopSiz, GenNum;
  logic SelectionEnb, SelectionDone = 0, CrossoverEnb, CrossoverDone = 0;
  logic [FAW-2:0] Child1Addr, Child2Addr, BestAddr = 0;
  logic FitnessEnb, FitnessDone = 0, HighBank;
  logic [NB+CF-1:0] NMAddrWr;
  logic [W-1:0] NMDataWr;
  logic NMWrEnb;
  logic [FAW+CF-1:0] CMAddrRd, CMAddrWr;
  logic [W-1:0] CMDataRd, CMDataWr;
  logic CMRdEnb, CMWrEnb;
  logic [FAW-1:0] FMAddrRd;
  logic [FDW-1:0] FMDataRd;
  logic FMRdEnb;

  logic [W-1:0] cm [2**(FAW+CF)];
  logic [W-1:0] nm [2**(NB+CF)];
  logic [FDW-1:0] fm [2**FAW];
  int checks = 0, failures = 0;
  string phases = "";
  int init_writes, init_bad, nm_writes;
  logic [FAW-2:0] child_log1 [$], child_log2 [$];
  logic hb_at_fit [$];
  logic [FAW-2:0] best_at_fit [$];

  main_controller #(.FMAddrWidth(FAW), .FMDataWidth(FDW), .CMDataWidth(W), .CMField(CF),
                    .MaxNetNumBits(NB)) dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // memories
  always_ff @(posedge Clk) begin
    if (CMRdEnb) CMDataRd <= cm[CMAddrRd];
    if (CMWrEnb) cm[CMAddrWr] <= CMDataWr;
    if (FMRdEnb) FMDataRd <= fm[FMAddrRd];
    if (NMWrEnb) nm[NMAddrWr] <= NMDataWr;
  end

  // behavioural responders
  initial forever begin
    @(posedge Clk);
    if (SelectionEnb) begin
      phases = {phases, "S"};
      repeat (2 + $urandom % 4) @(posedge Clk);
      #1 SelectionDone = 1; @(posedge Clk); #1 SelectionDone = 0;
      check(!SelectionEnb, "selection enable dropped after done");
    end else if (CrossoverEnb) begin
      phases = {phases, "X"};
      child_log1.push_back(Child1Addr); child_log2.push_back(Child2Addr);
      for (int w = 0; w <= int'(CMLength); w++) begin
        cm[{~HighBank, Child1Addr, CF'(w)}] = W'($urandom);
        cm[{~HighBank, Child2Addr, CF'(w)}] = W'($urandom);
      end
      repeat (2 + $urandom % 4) @(posedge Clk);
      #1 CrossoverDone = 1; @(posedge Clk); #1 CrossoverDone = 0;
      check(!CrossoverEnb, "crossover enable dropped after done");
    end else if (FitnessEnb) begin
      phases = {phases, "F"};
      hb_at_fit.push_back(HighBank);
      for (int p = 0; p <= int'(PopSiz); p++) fm[{HighBank, 8'(p)}] = FDW'($urandom);
      BestAddr = (FAW-1)'($urandom % (int'(PopSiz) + 1));
      best_at_fit.push_back(BestAddr);
      repeat (2 + $urandom % 4) @(posedge Clk);
      #1 FitnessDone = 1; @(posedge Clk); #1 FitnessDone = 0;
      check(!FitnessEnb, "fitness enable dropped after done");
    end
  end

  always @(posedge Clk) if (ResetN)
    check($onehot0({SelectionEnb, CrossoverEnb, FitnessEnb}), "one enable at a time");

  task automatic run(input int L, input int nets, input int pop, input int gens);
    logic [W-1:0] words [$];
    string expp = "F";
    int pairs = (pop + 1) / 2, nout = 0, ndone = 0, cyc = 0;
    CMLength = CF'(L - 1); NetNum = NB'(nets - 1); PopSiz = 8'(pop - 1); GenNum = 8'(gens - 1);
    phases = ""; child_log1.delete(); child_log2.delete(); hb_at_fit.delete(); best_at_fit.delete();
    init_writes = 0; init_bad = 0;
    @(negedge Clk); StartGA = 1; @(negedge Clk); StartGA = 0;
    for (int i = 0; i < nets * L; i++) begin
      while ($urandom % 3 == 0) begin NetlistVld = 0; @(negedge Clk); end
      NetlistVld = 1; NetlistIn = W'($urandom); words.push_back(NetlistIn);
      @(negedge Clk);
    end
    NetlistVld = 0;
    // initial population writes
    while (!FitnessEnb) begin
      @(posedge Clk);
      if (CMWrEnb) begin
        init_writes++;
        if (CMAddrWr[FAW+CF-1] != 1'b0 || CMAddrWr[CF +: FAW-1] > (FAW-1)'(pop - 1)) init_bad++;
      end
    end
    check(init_writes >= pop * L && init_bad == 0, $sformatf("initial population writes %0d", init_writes));
    // every initial chromosome is balanced: #ones and #zeros differ by <= 1
    for (int p = 0; p < pop; p++) begin
      int ones = 0;
      for (int w = 0; w < L; w++) ones += $countones(cm[{1'b0, 8'(p), 8'(w)}]);
      check(2 * ones - L * W <= 1 && L * W - 2 * ones <= 1,
            $sformatf("initial chromosome %0d balanced (%0d ones of %0d)", p, ones, L * W));
    end
    for (int i = 0; i < nets * L; i++)
      check(nm[{NB'(i / L), CF'(i % L)}] == words[i], "netlist word stored");
    // output stream
    while (!GADone && cyc < 1000000) begin
      @(posedge Clk); #1 cyc++;
      if (PopOutVld) begin
        int p = nout / L, w = nout % L;
        check(PopOut == cm[{HighBank, 8'(p), 8'(w)}], $sformatf("PopOut chrom %0d word %0d", p, w));
        check(FitnessOut == fm[{HighBank, 8'(p)}], "FitnessOut");
        nout++;
      end
    end
    repeat (5) begin @(posedge Clk); #1 if (GADone) ndone++; end
    check(ndone == 0, "single GADone pulse");
    check(nout == pop * L, $sformatf("output words %0d", nout));
    for (int g = 0; g < gens; g++) begin
      for (int k = 0; k < pairs; k++) expp = {expp, "SX"};
      expp = {expp, "F"};
    end
    check(phases == expp, $sformatf("phase order %s", phases));
    foreach (child_log1[i])
      check(child_log1[i] == (FAW-1)'(2 * (i % pairs)) && child_log2[i] == (FAW-1)'(2 * (i % pairs) + 1), "child slots");
    for (int i = 1; i < hb_at_fit.size(); i++) check(hb_at_fit[i] != hb_at_fit[i-1], "HighBank flips");
    repeat (3) @(negedge Clk);
  endtask

  // Elite copy: every write of the copy goes to the last slot of the child
  // half and carries the word of the best parent.
  int elite_checks = 0;
  always @(posedge Clk) if (ResetN && dut.state == dut.S_EL_WR) begin
    check(CMWrEnb && CMAddrWr == {~HighBank, PopSiz, CMAddrWr[CF-1:0]}, "elite write slot");
    check(CMDataWr == cm[{HighBank, BestAddr, CMAddrWr[CF-1:0]}], "elite data is the best parent");
    elite_checks++;
  end

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    CMLength = 0; NetNum = 0; PopSiz = 0; GenNum = 0;
    repeat (2) @(posedge Clk);
    ResetN = 1;
    run(1, 1, 2, 1);
    run(3, 5, 6, 2);
    run(4, 7, 9, 3);
    run(2, 3, 20, 2);
    check(elite_checks > 0, "elite copies seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
