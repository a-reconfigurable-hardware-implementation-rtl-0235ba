// tb_ga_processor: end-to-end runs of the GA partitioning processor at its
// default parameters (8-bit words, up to 256 words per chromosome, 256 nets,
// 256 individuals).
//
// For each problem the testbench generates a random netlist with the given
// numbers of nets and cells (each net joins 2 to 5 random cells, or 8 in the
// dense case), programs the control registers, pulses StartGA, streams the
// netlist in with random gaps in NetlistVld and collects the final population.
// Problem sizes follow the small published benchmark circuits (9 nets/10 cells,
// 12/15, 15/10, 32/24 and 239/274), run with population 20, 20 generations,
// crossover rate 252/256 and mutation rate 3/256; the netlists themselves are
// random stand-ins.
//
// Checks: every output fitness equals the cut count the testbench computes
// from the output chromosome and the netlist (saturated to 8 bits); all
// chromosomes are balanced (|ones - zeros| <= 1, padding
// bits of the last word included); the best final fitness is no worse than
// the best initial one; GADone comes once, after the whole population.
// Mechanisms counted over all runs (each must occur): netlist input gaps,
// early exit of the fitness scan on a cut, nets scanned to the end without a
// cut, crossed and copied pairs, mutations, balance flips in the initial
// population and in children, elite copies, parent-bank swaps in both
// directions, fitness saturation.
module tb_ga_processor;
  localparam int W = 8, FDW = 8;
  logic Clk = 0, ResetN = 0;
  logic CPUWr = 0;
  logic [3:0] CPUAddr = 0;
  logic [7:0] CPUData = 0;
  logic StartGA = 0, NetlistVld = 0;
  logic [W-1:0] NetlistIn = 0, PopOut;
  logic PopOutVld, GADone;
  logic [FDW-1:0] FitnessOut;
  int checks = 0, failures = 0;

  ga_processor dut (.*);

  always #10 Clk = ~Clk;   // 50 MHz, as in the published timing results

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters (probes into the design) ----------
  int n_gap = 0, n_early = 0, n_fullscan = 0, n_cross = 0, n_copy = 0;
  int n_mut = 0, n_repair = 0, n_initfix = 0, n_elite = 0, n_swap01 = 0, n_swap10 = 0, n_sat = 0;
  always @(posedge Clk) if (ResetN) begin
    if (dut.u_core.u_main.state == dut.u_core.u_main.S_LOAD && !NetlistVld) n_gap++;
    if (dut.u_core.u_fitness.state == dut.u_core.u_fitness.S_RUN) begin
      if (dut.u_core.u_fitness.cut && dut.u_core.u_fitness.wc != dut.u_core.u_fitness.CMLength) n_early++;
      if (!dut.u_core.u_fitness.cut && dut.u_core.u_fitness.wc == dut.u_core.u_fitness.CMLength) n_fullscan++;
      if (dut.u_core.u_fitness.cut && dut.u_core.u_fitness.acc == '1) n_sat++;
    end
    if (dut.u_core.u_crossover.state == dut.u_core.u_crossover.S_RD1 && dut.u_core.u_crossover.wcnt == 0) begin
      if (dut.u_core.u_crossover.do_cross) n_cross++; else n_copy++;
    end
    if (dut.u_core.u_crossover.state == dut.u_core.u_crossover.S_WR1 &&
        dut.u_core.u_crossover.rnd[31:24] < dut.u_core.u_crossover.MutationRate) n_mut++;
    if (dut.u_core.u_crossover.state == dut.u_core.u_crossover.S_RP_CHK && dut.u_core.CMWrEnb) n_repair++;
    if (dut.u_core.u_main.state == dut.u_core.u_main.S_IN_CHK && dut.u_core.CMWrEnb) n_initfix++;
    if (dut.u_core.u_main.state == dut.u_core.u_main.S_EL_WR && dut.u_core.u_main.wc == 0) n_elite++;
    if (dut.u_core.u_main.state == dut.u_core.u_main.S_SWAP) begin
      if (dut.u_core.HighBank) n_swap10++; else n_swap01++;
    end
  end

  // initial fitness values (first fitness phase of a run)
  int init_best;
  bit in_first_fit;
  always @(posedge Clk) if (in_first_fit && dut.u_core.FMWrEnb)
    if (int'(dut.u_core.FMDataWr) < init_best) init_best = int'(dut.u_core.FMDataWr);

  // ---------------- one GA run ----------------
  task automatic wr_reg(input logic [3:0] a, input logic [7:0] d);
    @(negedge Clk); CPUWr = 1; CPUAddr = a; CPUData = d;
    @(negedge Clk); CPUWr = 0;
  endtask

  task automatic ga_run(input string name, input int nets, input int cells, input int pop,
                        input int gens, input int xrate, input int mrate, input int fanout_min,
                        input int fanout_max);
    int L = (cells + W - 1) / W;          // words per chromosome
    int nbits = L * W;
    logic [W-1:0] netw [][];
    logic [W-1:0] outw [][];
    int outfit [];
    int nout = 0, ndone = 0, cyc = 0, best = 1 << 30, sum = 0;
    longint t0;
    netw = new[nets];
    foreach (netw[n]) begin
      netw[n] = new[L];
      foreach (netw[n][w]) netw[n][w] = '0;
      for (int k = 0; k < fanout_min + $urandom % (fanout_max - fanout_min + 1); k++) begin
        int c = $urandom % cells;
        netw[n][c / W][c % W] = 1'b1;
      end
    end
    outw = new[pop];
    foreach (outw[p]) outw[p] = new[L];
    outfit = new[pop];
    wr_reg(4'h0, 8'(L - 1));    wr_reg(4'h1, 8'((L - 1) >> 8));
    wr_reg(4'h2, 8'(nets - 1)); wr_reg(4'h3, 8'((nets - 1) >> 8));
    wr_reg(4'h4, 8'(pop - 1));  wr_reg(4'h5, 8'(gens - 1));
    wr_reg(4'h6, 8'(xrate));    wr_reg(4'h7, 8'(mrate));
    init_best = 1 << 30;
    @(negedge Clk); StartGA = 1; @(negedge Clk); StartGA = 0;
    t0 = $time;
    for (int n = 0; n < nets; n++)
      for (int w = 0; w < L; w++) begin
        while ($urandom % 8 == 0) begin NetlistVld = 0; @(negedge Clk); end
        NetlistVld = 1; NetlistIn = netw[n][w];
        @(negedge Clk);
      end
    NetlistVld = 0;
    in_first_fit = 1;
    wait (dut.u_core.u_main.state == dut.u_core.u_main.S_SEL ||
          dut.u_core.u_main.state == dut.u_core.u_main.S_OUT_F);
    in_first_fit = 0;
    while (!GADone && cyc < 50000000) begin
      @(posedge Clk); #1 cyc++;
      if (PopOutVld) begin
        int p = nout / L, w = nout % L;
        if (p < pop) begin outw[p][w] = PopOut; outfit[p] = int'(FitnessOut); end
        nout++;
      end
    end
    check(GADone, {name, " GADone"});
    repeat (4) begin @(posedge Clk); #1 if (GADone || PopOutVld) ndone++; end
    check(ndone == 0, {name, " single GADone, no output after it"});
    check(nout == pop * L, $sformatf("%s output words %0d", name, nout));
    for (int p = 0; p < pop; p++) begin
      int cuts = 0, ones = 0;
      for (int n = 0; n < nets; n++) begin
        bit s0 = 0, s1 = 0;
        for (int w = 0; w < L; w++) begin
          if ((netw[n][w] & outw[p][w]) != 0) s1 = 1;
          if ((netw[n][w] & ~outw[p][w]) != 0) s0 = 1;
        end
        if (s0 && s1) cuts++;
      end
      if (cuts > 255) cuts = 255;
      check(outfit[p] == cuts, $sformatf("%s chromosome %0d fitness %0d, recomputed %0d", name, p, outfit[p], cuts));
      for (int w = 0; w < L; w++) ones += $countones(outw[p][w]);
      check(2 * ones - nbits <= 1 && nbits - 2 * ones <= 1,
              $sformatf("%s chromosome %0d balance %0d/%0d", name, p, ones, nbits));
      if (outfit[p] < best) best = outfit[p];
      sum += outfit[p];
    end
    check(best <= init_best, $sformatf("%s best final %0d <= best initial %0d", name, best, init_best));
    $display("%-12s nets=%0d cells=%0d pop=%0d gens=%0d: initial best %0d, final best %0d, final average %0.1f, %0d clocks (%0.2f ms at 50 MHz)",
             name, nets, cells, pop, gens, init_best, best, real'(sum) / pop, ($time - t0) / 20,
             real'(($time - t0) / 20) / 50000.0);
    repeat (5) @(negedge Clk);
  endtask

  initial begin
    #400_000_000_000;   // watchdog: 20 million clocks
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge Clk);
    ResetN = 1;
    ga_run("net9_mod10",   9,  10, 20, 20, 252, 3, 2, 5);
    ga_run("net12_mod15", 12,  15, 20, 20, 252, 3, 2, 5);
    ga_run("net15_mod10", 15,  10, 20, 20, 252, 3, 2, 5);
    ga_run("pcb1",        32,  24, 20, 20, 252, 3, 2, 5);
    ga_run("low_xrate",   20,  16, 16, 10, 128, 40, 2, 5);
    ga_run("dense",      256,  16,  8,  2, 252, 3, 8, 8);
    ga_run("chip3",      239, 274, 20, 20, 252, 3, 2, 5);
    $display("mechanisms: netlist gaps %0d, early exits %0d, full scans %0d, crossed pairs %0d, copied pairs %0d, mutations %0d, initial balance flips %0d, child repair flips %0d, elite copies %0d, swaps 0->1 %0d, 1->0 %0d, saturations %0d",
             n_gap, n_early, n_fullscan, n_cross, n_copy, n_mut, n_initfix, n_repair, n_elite, n_swap01, n_swap10, n_sat);
    check(n_gap > 0, "netlist gap seen");
    check(n_early > 0, "early exit seen");
    check(n_fullscan > 0, "full scan seen");
    check(n_cross > 0, "crossover seen");
    check(n_copy > 0, "parent copy seen");
    check(n_mut > 0, "mutation seen");
    check(n_initfix > 0, "initial balance flip seen");
    check(n_repair > 0, "child repair seen");
    check(n_elite > 0, "elite copy seen");
    check(n_swap01 > 0 && n_swap10 > 0, "bank swaps both ways");
    check(n_sat > 0, "fitness saturation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
