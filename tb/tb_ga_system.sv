// tb_ga_system: complete runs of the prototyping-board system at its default
// parameters (8-bit words, up to 256 words per chromosome, 256 nets, 256
// individuals, 1 MB SSRAM of 32-bit words with two clocks of read latency).
//
// The testbench plays the system-bus side and the SSRAM chip. For each
// problem it generates a random netlist with the given numbers of nets and
// cells, writes the GA parameters (words 0..7) and the netlist (from word
// 0x100) into the SSRAM through the bus port, sets the GA-enable bit with a
// host write, polls the bit until GACtlReset has cleared it, and reads the
// final population back through the bus port from word 0x20000.
// Problem sizes follow the small published benchmark circuits (9 nets/10
// cells, 12/15, 15/10, 32/24 and 239/274) with population 20, 20 generations,
// crossover rate 252/256 and mutation rate 3/256; the netlists are random
// stand-ins. Two further runs use a low crossover rate with a high mutation
// rate, and a dense netlist whose cut count saturates the 8-bit fitness.
//
// Checks: every stored fitness equals the cut count recomputed from the
// stored chromosome (saturated to 8 bits); every chromosome is balanced; the
// best final fitness is no worse than the best initial one; the host write
// sets EnbGACtl; one GACtlReset per run, which clears EnbGACtl.
// Mechanisms counted over all runs (each must occur): SSRAM hand-over to
// the GA controller and back, early exit of the fitness scan, nets scanned
// to the end without a cut, crossed and copied pairs, mutations, balance flips in the initial population and in children, elite
// copies, parent-bank swaps in both directions, fitness saturation.
module tb_ga_system;
  localparam int W = 8, FDW = 8, AW = 18, DW = 32;
  logic Clk = 0, ResetN = 0;
  logic CtlWr = 0, CtlWrData = 0, EnbGACtl, GACtlReset;
  logic [AW-1:0] BusAddr = 0, ZbtAddr;
  logic [DW-1:0] BusWrData = 0, BusRdData, ZbtWrData, ZbtRdData;
  logic [DW/8-1:0] BusByteEnb = 0, ZbtByteEnb;
  logic BusWr = 0, BusRd = 0, ZbtWr, ZbtRd;
  int checks = 0, failures = 0;

  ga_system dut (.*);

  always #10 Clk = ~Clk;   // 50 MHz

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // SSRAM chip model: byte-enabled writes, two clocks of read latency
  logic [DW-1:0] zbt [2**AW];
  logic [DW-1:0] rd1, rd2;
  always_ff @(posedge Clk) begin
    if (ZbtRd) rd1 <= zbt[ZbtAddr];
    rd2 <= rd1;
    if (ZbtWr)
      for (int b = 0; b < DW / 8; b++) if (ZbtByteEnb[b]) zbt[ZbtAddr][8*b +: 8] <= ZbtWrData[8*b +: 8];
  end
  assign ZbtRdData = rd2;

  // bus-side SSRAM accesses
  task automatic bus_write(input int a, input logic [DW-1:0] d);
    @(negedge Clk); BusAddr = AW'(a); BusWrData = d; BusByteEnb = '1; BusWr = 1;
    @(negedge Clk); BusWr = 0;
  endtask
  task automatic bus_read(input int a, output logic [DW-1:0] d);
    @(negedge Clk); BusAddr = AW'(a); BusRd = 1;
    @(negedge Clk); BusRd = 0;
    @(negedge Clk);
    d = BusRdData;
  endtask

  // ---------------- mechanism counters (probes into the design) ----------
  int n_hand = 0, n_back = 0, n_early = 0, n_fullscan = 0, n_cross = 0, n_copy = 0;
  int n_mut = 0, n_repair = 0, n_initfix = 0, n_elite = 0, n_swap01 = 0, n_swap10 = 0, n_sat = 0;
  int n_reset = 0;
  logic enb_q = 0;
  always @(posedge Clk) if (ResetN) begin
    enb_q <= EnbGACtl;
    if (EnbGACtl && !enb_q) n_hand++;
    if (!EnbGACtl && enb_q) n_back++;
    if (GACtlReset) n_reset++;
    if (dut.u_gap.u_core.u_fitness.state == dut.u_gap.u_core.u_fitness.S_RUN) begin
      if (dut.u_gap.u_core.u_fitness.cut && dut.u_gap.u_core.u_fitness.wc != dut.u_gap.u_core.u_fitness.CMLength) n_early++;
      if (!dut.u_gap.u_core.u_fitness.cut && dut.u_gap.u_core.u_fitness.wc == dut.u_gap.u_core.u_fitness.CMLength) n_fullscan++;
      if (dut.u_gap.u_core.u_fitness.cut && dut.u_gap.u_core.u_fitness.acc == '1) n_sat++;
    end
    if (dut.u_gap.u_core.u_crossover.state == dut.u_gap.u_core.u_crossover.S_RD1 && dut.u_gap.u_core.u_crossover.wcnt == 0) begin
      if (dut.u_gap.u_core.u_crossover.do_cross) n_cross++; else n_copy++;
    end
    if (dut.u_gap.u_core.u_crossover.state == dut.u_gap.u_core.u_crossover.S_WR1 &&
        dut.u_gap.u_core.u_crossover.rnd[31:24] < dut.u_gap.u_core.u_crossover.MutationRate) n_mut++;
    if (dut.u_gap.u_core.u_crossover.state == dut.u_gap.u_core.u_crossover.S_RP_CHK && dut.u_gap.u_core.CMWrEnb) n_repair++;
    if (dut.u_gap.u_core.u_main.state == dut.u_gap.u_core.u_main.S_IN_CHK && dut.u_gap.u_core.CMWrEnb) n_initfix++;
    if (dut.u_gap.u_core.u_main.state == dut.u_gap.u_core.u_main.S_EL_WR && dut.u_gap.u_core.u_main.wc == 0) n_elite++;
    if (dut.u_gap.u_core.u_main.state == dut.u_gap.u_core.u_main.S_SWAP) begin
      if (dut.u_gap.u_core.HighBank) n_swap10++; else n_swap01++;
    end
  end

  // best fitness of the initial population (first fitness phase of a run)
  int init_best;
  bit in_first_fit;
  always @(posedge Clk) if (in_first_fit && dut.u_gap.u_core.FMWrEnb)
    if (int'(dut.u_gap.u_core.FMDataWr) < init_best) init_best = int'(dut.u_gap.u_core.FMDataWr);

  task automatic ga_run(input string name, input int nets, input int cells, input int pop,
                        input int gens, input int xrate, input int mrate, input int fanout_min,
                        input int fanout_max);
    int L = (cells + W - 1) / W, nbits = L * W;
    logic [W-1:0] netw [][];
    int cyc = 0, best = 1 << 30, sum = 0, resets0 = n_reset;
    bit reset_seen = 0;
    longint t0;
    logic [DW-1:0] d;
    netw = new[nets];
    foreach (netw[n]) begin
      netw[n] = new[L];
      foreach (netw[n][w]) netw[n][w] = '0;
      for (int k = 0; k < fanout_min + $urandom % (fanout_max - fanout_min + 1); k++) begin
        int c = $urandom % cells;
        netw[n][c / W][c % W] = 1'b1;
      end
    end
    // parameters and netlist into the SSRAM through the bus port
    bus_write(0, DW'(L - 1));    bus_write(1, DW'((L - 1) >> 8));
    bus_write(2, DW'(nets - 1)); bus_write(3, DW'((nets - 1) >> 8));
    bus_write(4, DW'(pop - 1));  bus_write(5, DW'(gens - 1));
    bus_write(6, DW'(xrate));    bus_write(7, DW'(mrate));
    for (int n = 0; n < nets; n++)
      for (int w = 0; w < L; w++) bus_write('h100 + n * L + w, {24'($urandom), netw[n][w]});
    // hand the SSRAM to the GA controller and wait for the clear request
    init_best = 1 << 30;
    @(negedge Clk); CtlWr = 1; CtlWrData = 1; in_first_fit = 1;
    @(negedge Clk); CtlWr = 0; CtlWrData = 0;
    check(EnbGACtl, {name, " host write sets EnbGACtl"});
    t0 = $time;
    // poll the enable bit, as the host does, until the run has cleared it
    while (EnbGACtl && cyc < 10000000) begin
      @(posedge Clk); #1 cyc++;
      if (GACtlReset) reset_seen = 1;
      if (dut.u_gap.u_core.u_main.state == dut.u_gap.u_core.u_main.S_SEL ||
          dut.u_gap.u_core.u_main.state == dut.u_gap.u_core.u_main.S_OUT_F) in_first_fit = 0;
    end
    check(reset_seen && !EnbGACtl, {name, " GACtlReset cleared EnbGACtl"});
    // read the results back
    for (int p = 0; p < pop; p++) begin
      int cuts = 0, ones = 0, fit = 0;
      logic [W-1:0] cw [];
      cw = new[L];
      for (int w = 0; w < L; w++) begin
        bus_read('h20000 + p * L + w, d);
        cw[w] = d[W-1:0];
        if (w == 0) fit = int'(d[W +: FDW]);
        else check(int'(d[W +: FDW]) == fit, $sformatf("%s chromosome %0d same fitness on every word", name, p));
        ones += $countones(cw[w]);
      end
      for (int n = 0; n < nets; n++) begin
        bit s0 = 0, s1 = 0;
        for (int w = 0; w < L; w++) begin
          if ((netw[n][w] & cw[w]) != 0) s1 = 1;
          if ((netw[n][w] & ~cw[w]) != 0) s0 = 1;
        end
        if (s0 && s1) cuts++;
      end
      if (cuts > 255) cuts = 255;
      check(fit == cuts, $sformatf("%s chromosome %0d fitness %0d, recomputed %0d", name, p, fit, cuts));
      check(2 * ones - nbits <= 1 && nbits - 2 * ones <= 1,
            $sformatf("%s chromosome %0d balance %0d/%0d", name, p, ones, nbits));
      if (fit < best) best = fit;
      sum += fit;
    end
    check(best <= init_best, $sformatf("%s best final %0d <= best initial %0d", name, best, init_best));
    check(n_reset - resets0 == 1, {name, " one GACtlReset"});
    $display("%-12s nets=%0d cells=%0d pop=%0d gens=%0d: initial best %0d, final best %0d, final average %0.1f, %0d clocks (%0.2f ms at 50 MHz)",
             name, nets, cells, pop, gens, init_best, best, real'(sum) / pop, ($time - t0) / 20,
             real'(($time - t0) / 20) / 50000.0);
  endtask

  initial begin
    #400_000_000_000;   // watchdog: 20 million clocks
    failures++;
    $display("watchdog expired");
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
    $display("mechanisms: SSRAM hand-overs %0d/%0d, early exits %0d, full scans %0d, crossed pairs %0d, copied pairs %0d, mutations %0d, initial balance flips %0d, child repair flips %0d, elite copies %0d, swaps 0->1 %0d, 1->0 %0d, saturations %0d",
             n_hand, n_back, n_early, n_fullscan, n_cross, n_copy, n_mut, n_initfix, n_repair, n_elite, n_swap01, n_swap10, n_sat);
    check(n_hand == 7 && n_back == 7, "SSRAM handed over and back once per run");
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
