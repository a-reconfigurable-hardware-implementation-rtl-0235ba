// tb_crossover: crossover, mutation and balance repair against the rules.
//
// The chromosome memory is a testbench array with one cycle of read latency;
// parents are random balanced or unbalanced chromosomes. The testbench logs
// every write. The first 2*(CMLength+1) writes are the children as crossed
// (child1 word w then child2 word w); later writes are repair flips.
// Checks per run:
//  - the child words go to {~HighBank, ChildAddr, w} in order;
//  - rates 0/0: children equal the parents word for word;
//  - crossover rate 255, mutation 0: c1^c2 == p1^p2 and, where the parents
//    agree, both children carry the parents' bit (uniform crossover);
//  - mutation rate 255, crossover 0: every child word differs from its
//    parent in exactly one bit;
//  - each repair write changes exactly one bit, from the majority value;
//  - finally both children have |ones - zeros| <= 1, the parents are
//    untouched, and nothing outside the two child slots was written;
//  - CrossoverDone comes 4*(CMLength+1) + 3*attempts + 3 clocks after the
//    enable, attempts being the repair reads.
module tb_crossover;
  localparam int FAW = 9, W = 8, CF = 8;
  logic Clk = 0, ResetN = 0;
  logic [7:0] CrossoverRate, MutationRate;
  logic [CF-1:0] CMLength;
  logic CrossoverEnb = 0, CrossoverDone, HighBank = 0;
  logic [FAW-2:0] Parent1Addr, Parent2Addr, Child1Addr, Child2Addr;
  logic [FAW+CF-1:0] CMAddrRd, CMAddrWr;
  logic [W-1:0] CMDataRd, CMDataWr;
  logic CMRdEnb, CMWrEnb;

  logic [W-1:0] cm [2**(FAW+CF)];
  logic [FAW+CF-1:0] wa [$];
  logic [W-1:0] wd [$];
  int reads = 0;
  int checks = 0, failures = 0;
  int n_cross = 0, n_copy = 0, n_repair = 0;

  crossover #(.FMAddrWidth(FAW), .CMDataWidth(W), .CMField(CF)) dut (.*);

  always #5 Clk = ~Clk;
  always @(posedge Clk) begin
    if (CMRdEnb) begin CMDataRd <= cm[CMAddrRd]; reads++; end
    if (CMWrEnb) begin
      wa.push_back(CMAddrWr); wd.push_back(CMDataWr);
      cm[CMAddrWr] <= CMDataWr;
    end
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [FAW+CF-1:0] ad(input logic b, input logic [FAW-2:0] c, input int w);
    return {b, c, CF'(w)};
  endfunction

  function automatic int ones_of(input logic b, input logic [FAW-2:0] c);
    int n = 0;
    for (int w = 0; w <= int'(CMLength); w++) n += $countones(cm[ad(b, c, w)]);
    return n;
  endfunction

  task automatic run(input int mode, input int len, input bit balanced);
    // mode 0: copy, 1: crossover only, 2: mutation only, 3: realistic rates
    logic [W-1:0] p1 [256], p2 [256];
    logic [W-1:0] snap [logic [FAW+CF-1:0]];
    int L, cyc = 0, nb, r0;
    L = len;
    CMLength = CF'(L);
    HighBank = 1'($urandom);
    Parent1Addr = (FAW-1)'($urandom); Parent2Addr = (FAW-1)'($urandom);
    Child1Addr = (FAW-1)'($urandom % 128) * 2; Child2Addr = Child1Addr + 1;
    case (mode)
      0: begin CrossoverRate = 0;   MutationRate = 0;   end
      1: begin CrossoverRate = 255; MutationRate = 0;   end
      2: begin CrossoverRate = 0;   MutationRate = 255; end
      default: begin CrossoverRate = 252; MutationRate = 3; end
    endcase
    for (int w = 0; w <= L; w++) begin
      p1[w] = W'($urandom); p2[w] = W'($urandom);
      if (balanced) begin p1[w] = (w % 2 != 0) ? ~p1[w-1] : p1[w]; p2[w] = (w % 2 != 0) ? ~p2[w-1] : p2[w]; end
    end
    if (balanced && (L % 2 == 0)) begin p1[L] = 8'h0F; p2[L] = 8'h3C; end
    for (int w = 0; w <= L; w++) begin
      cm[ad(HighBank, Parent1Addr, w)] = p1[w];
      cm[ad(HighBank, Parent2Addr, w)] = p2[w];
    end
    if (Parent2Addr == Parent1Addr)
      for (int w = 0; w <= L; w++) p2[w] = p1[w];
    wa.delete(); wd.delete(); reads = 0;
    @(negedge Clk); CrossoverEnb = 1;
    do begin @(posedge Clk); #1 cyc++; end while (!CrossoverDone && cyc < 100000);
    @(negedge Clk); CrossoverEnb = 0;
    nb = (L + 1) * W;
    check(wa.size() >= 2 * (L + 1), "child word writes");
    if (wa.size() < 2 * (L + 1)) return;
    for (int w = 0; w <= L; w++) begin
      logic [W-1:0] c1 = wd[2*w], c2 = wd[2*w+1];
      check(wa[2*w] == ad(~HighBank, Child1Addr, w) && wa[2*w+1] == ad(~HighBank, Child2Addr, w), "child address");
      case (mode)
        0: check(c1 == p1[w] && c2 == p2[w], "copy");
        1: check((c1 ^ c2) == (p1[w] ^ p2[w]) && ((c1 & ~(p1[w] ^ p2[w])) == (p1[w] & ~(p1[w] ^ p2[w]))), $sformatf("uniform crossover word %0d", w));
        2: check($countones(c1 ^ p1[w]) == 1 && $countones(c2 ^ p2[w]) == 1, "mutation flips one bit");
        default: ;
      endcase
      if (mode == 1 || mode == 3) begin
        if (c1 != p1[w] && c1 != p2[w]) n_cross++; else n_copy++;
      end
    end
    // replay repair writes on the crossed children
    for (int i = 0; i < 2 * (L + 1); i++) snap[wa[i]] = wd[i];
    for (int i = 2 * (L + 1); i < wa.size(); i++) begin
      logic [FAW-2:0] ch = wa[i][CF +: FAW-1];
      int ones = 0;
      check(wa[i][FAW+CF-1] == ~HighBank && (ch == Child1Addr || ch == Child2Addr), "repair address");
      for (int w = 0; w <= L; w++) ones += $countones(snap[ad(~HighBank, ch, w)]);
      check($countones(snap[wa[i]] ^ wd[i]) == 1, "repair flips one bit");
      check((2 * ones > nb) ? ($countones(wd[i]) < $countones(snap[wa[i]]))
                            : ($countones(wd[i]) > $countones(snap[wa[i]])), "repair direction");
      snap[wa[i]] = wd[i];
      n_repair++;
    end
    r0 = ones_of(~HighBank, Child1Addr);
    check(2 * r0 - nb <= 1 && nb - 2 * r0 <= 1, $sformatf("child1 balance %0d of %0d", r0, nb));
    r0 = ones_of(~HighBank, Child2Addr);
    check(2 * r0 - nb <= 1 && nb - 2 * r0 <= 1, $sformatf("child2 balance %0d of %0d", r0, nb));
    for (int w = 0; w <= L; w++)
      check(cm[ad(HighBank, Parent1Addr, w)] == p1[w] || Parent1Addr == Parent2Addr, "parent1 untouched");
    foreach (wa[i]) check(wa[i][CF +: FAW-1] == Child1Addr || wa[i][CF +: FAW-1] == Child2Addr, "write inside child slots");
    // reads: 2 per word, one per repair attempt
    check(cyc == 4 * (L + 1) + 3 * (reads - 2 * (L + 1)) + 3,
          $sformatf("done latency %0d (reads %0d)", cyc, reads));
    repeat (2) @(negedge Clk);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    CrossoverRate = 0; MutationRate = 0; CMLength = 0;
    Parent1Addr = 0; Parent2Addr = 0; Child1Addr = 0; Child2Addr = 0;
    CMDataRd = 0;
    repeat (2) @(posedge Clk);
    ResetN = 1;
    for (int t = 0; t < 10; t++) run(0, $urandom % 8, 1);
    for (int t = 0; t < 10; t++) run(1, $urandom % 8, 1);
    for (int t = 0; t < 10; t++) run(2, $urandom % 8, 1);
    for (int t = 0; t < 20; t++) run(3, $urandom % 40, 1'(t % 2));
    check(n_cross > 0 && n_copy > 0 && n_repair > 0, "all paths exercised");
    $display("crossed words %0d, copied words %0d, repair flips %0d", n_cross, n_copy, n_repair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
