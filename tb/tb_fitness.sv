// tb_fitness: cut-count fitness against a reference model.
//
// Chromosome and netlist memories are testbench arrays with one cycle of read
// latency. Scenarios: (1) the one-word examples of a chromosome/net pair whose
// net spans both partitions, plus an all-zero chromosome (expected cuts
// 2, 2, 0); (2) random populations and sparse random netlists of several
// sizes in both banks; (3) 256 nets that are all cut, where the 8-bit
// fitness must saturate at 255. For each run the testbench checks every
// fitness written (address {HighBank, index}), that nothing else is written,
// BestAddr/BestFitness, and that FitnessDone comes exactly after the number of
// word reads the early-exit rule implies (reads counted by the reference, plus
// two clocks).
module tb_fitness;
  localparam int FAW = 9, FDW = 8, W = 8, CF = 8, NB = 8;
  logic Clk = 0, ResetN = 0;
  logic [NB-1:0] NetNum;
  logic [7:0] PopSiz;
  logic [CF-1:0] CMLength;
  logic FitnessEnb = 0, FitnessDone, HighBank = 0;
  logic [FAW+CF-1:0] CMAddrRd;
  logic [W-1:0] CMDataRd, NMDataRd;
  logic CMRdEnb, NMRdEnb;
  logic [NB+CF-1:0] NMAddr;
  logic [FAW-1:0] FMAddr;
  logic [FDW-1:0] FMDataWr, BestFitness;
  logic FMWrEnb;
  logic [FAW-2:0] BestAddr;

  logic [W-1:0] cm [2**(FAW+CF)];
  logic [W-1:0] nm [2**(NB+CF)];
  logic [FDW-1:0] fm_wr [int];
  int checks = 0, failures = 0;

  fitness #(.FMAddrWidth(FAW), .FMDataWidth(FDW), .CMDataWidth(W), .CMField(CF),
            .MaxNetNumBits(NB)) dut (.*);

  always #5 Clk = ~Clk;
  always_ff @(posedge Clk) begin
    if (CMRdEnb) CMDataRd <= cm[CMAddrRd];
    if (NMRdEnb) NMDataRd <= nm[NMAddr];
    if (FMWrEnb) fm_wr[int'(FMAddr)] = FMDataWr;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference: cut count of chromosome p, and the words the early exit reads.
  function automatic int ref_fit(input int p, output int reads);
    int cuts = 0;
    reads = 0;
    for (int n = 0; n <= int'(NetNum); n++) begin
      bit s0 = 0, s1 = 0;
      for (int w = 0; w <= int'(CMLength); w++) begin
        logic [W-1:0] c = cm[{HighBank, 8'(p), 8'(w)}];
        logic [W-1:0] nt = nm[{8'(n), 8'(w)}];
        reads++;
        for (int b = 0; b < W; b++) if (nt[b]) begin
          if (c[b]) s1 = 1; else s0 = 1;
        end
        if (s0 && s1) break;
      end
      if (s0 && s1) cuts++;
    end
    return cuts;
  endfunction

  task automatic run(input string tag, input int exp0 = -1, input int exp1 = -1, input int exp2 = -1);
    int cyc = 0, total_reads = 0, bestf = 1 << 30, besta = 0;
    int expf [$];
    fm_wr.delete();
    for (int p = 0; p <= int'(PopSiz); p++) begin
      int r;
      int f = ref_fit(p, r);
      total_reads += r;
      if (f > 255) f = 255;
      expf.push_back(f);
      if (f < bestf) begin bestf = f; besta = p; end
    end
    @(negedge Clk); FitnessEnb = 1;
    do begin @(posedge Clk); #1 cyc++; end while (!FitnessDone && cyc < 2000000);
    @(negedge Clk); FitnessEnb = 0;
    check(cyc == total_reads + 2, $sformatf("%s cycles %0d expected %0d", tag, cyc, total_reads + 2));
    check(fm_wr.num() == int'(PopSiz) + 1, $sformatf("%s number of writes %0d", tag, fm_wr.num()));
    for (int p = 0; p <= int'(PopSiz); p++) begin
      int a = int'({HighBank, 8'(p)});
      check(fm_wr.exists(a) && fm_wr[a] == FDW'(expf[p]),
            $sformatf("%s fitness[%0d] = %0d expected %0d", tag, p, fm_wr.exists(a) ? fm_wr[a] : -1, expf[p]));
    end
    if (exp0 >= 0) check(expf[0] == exp0 && expf[1] == exp1 && expf[2] == exp2, {tag, " hand values"});
    check(BestAddr == (FAW-1)'(besta) && BestFitness == FDW'(bestf), $sformatf("%s best %0d/%0d", tag, BestAddr, BestFitness));
    repeat (3) @(negedge Clk);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    NetNum = 0; PopSiz = 0; CMLength = 0;
    repeat (2) @(posedge Clk);
    ResetN = 1;
    // (1) one-word examples
    CMLength = 0; NetNum = 1; PopSiz = 2; HighBank = 0;
    nm[{8'd0, 8'd0}] = 8'b0101_1100;
    nm[{8'd1, 8'd0}] = 8'b0010_1110;
    cm[{1'b0, 8'd0, 8'd0}] = 8'b1111_0000;
    cm[{1'b0, 8'd1, 8'd0}] = 8'b1010_1010;
    cm[{1'b0, 8'd2, 8'd0}] = 8'b0000_0000;
    run("examples", 2, 2, 0);
    // (2) random problems
    for (int t = 0; t < 12; t++) begin
      CMLength = CF'($urandom % 6);
      NetNum   = NB'($urandom % 30);
      PopSiz   = 8'($urandom % 24);
      HighBank = 1'(t % 2);
      for (int n = 0; n <= int'(NetNum); n++) begin
        for (int w = 0; w <= int'(CMLength); w++) nm[{8'(n), 8'(w)}] = '0;
        for (int k = 0; k < 2 + $urandom % 4; k++) begin
          automatic int bit_i = $urandom % ((int'(CMLength) + 1) * W);
          nm[{8'(n), 8'(bit_i / W)}][bit_i % W] = 1'b1;
        end
      end
      for (int p = 0; p <= int'(PopSiz); p++)
        for (int w = 0; w <= int'(CMLength); w++)
          cm[{HighBank, 8'(p), 8'(w)}] = ($urandom % 5 == 0) ? 8'h00 : W'($urandom);
      run($sformatf("random %0d", t));
    end
    // (3) saturation: 256 nets, all cut
    CMLength = 1; NetNum = 8'd255; PopSiz = 1; HighBank = 1;
    for (int n = 0; n < 256; n++) begin
      nm[{8'(n), 8'd0}] = 8'h01;
      nm[{8'(n), 8'd1}] = 8'h80;
    end
    cm[{1'b1, 8'd0, 8'd0}] = 8'h00; cm[{1'b1, 8'd0, 8'd1}] = 8'hFF;
    cm[{1'b1, 8'd1, 8'd0}] = 8'hFE; cm[{1'b1, 8'd1, 8'd1}] = 8'h7F;
    run("saturate");
    check(fm_wr[int'({1'b1, 8'd0})] == 8'd255, "saturated value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
