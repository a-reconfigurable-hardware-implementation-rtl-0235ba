// ga_core_bench: one planted-partition run set for the processor core at a
// chosen set of generic sizes, used by tb_ga_core.
//
// The core's three memories are arrays here with one clock of read latency,
// so every access the core makes can be watched. Workload: planted
// partitions. The cells are split into two secret halves; most nets join
// cells of one half only, and a few "bridge" nets join both halves, so the
// best balanced cut is known (the number of bridges). For each problem the
// bench checks:
//  - single-port rules: the netlist and fitness memories are never read and
//    written in the same clock, and no access leaves the configured area
//    (net < NetNum+1, word < CMLength+1, chromosome slot < PopSiz+1, except
//    the spare child slot PopSiz+1 of an odd population);
//  - every output fitness equals the cut count recomputed from the output
//    chromosome, and every output chromosome is balanced;
//  - the best final cut is no worse than the best initial one, and on the
//    smallest problem (at CellScale 1) reaches the planted optimum.
// CellScale multiplies the cell counts of the four problems, so that wide
// chromosome words still give chromosomes of several words. The bench starts
// after reset and raises Finished when its last problem is checked; Checks
// and Failures hold its counts.
module ga_core_bench #(
  parameter int FAW = 6,
  parameter int FDW = 8,
  parameter int W = 4,
  parameter int CF = 3,
  parameter int NB = 5,
  parameter int CellScale = 1
) (
  output int Checks,
  output int Failures,
  output bit Finished
);
  logic Clk = 0, ResetN = 0;
  logic CPUWr = 0;
  logic [3:0] CPUAddr = 0;
  logic [7:0] CPUData = 0;
  logic StartGA = 0, NetlistVld = 0;
  logic [W-1:0] NetlistIn = 0, PopOut;
  logic PopOutVld, GADone;
  logic [FDW-1:0] FitnessOut;
  logic [NB+CF-1:0] NMAddr;
  logic [W-1:0] NMDataWr, NMDataRd;
  logic NMWrEnb, NMRdEnb;
  logic [FAW+CF-1:0] CMAddrRd, CMAddrWr;
  logic [W-1:0] CMDataRd, CMDataWr;
  logic CMRdEnb, CMWrEnb;
  logic [FAW-1:0] FMAddr;
  logic [FDW-1:0] FMDataRd, FMDataWr;
  logic FMRdEnb, FMWrEnb;
  int checks = 0, failures = 0;
  assign Checks = checks;
  assign Failures = failures;

  ga_core #(.FMAddrWidth(FAW), .FMDataWidth(FDW), .CMDataWidth(W), .CMField(CF),
            .MaxNetNumBits(NB)) dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // memories
  logic [W-1:0]   nm [2**(NB+CF)];
  logic [W-1:0]   cm [2**(FAW+CF)];
  logic [FDW-1:0] fm [2**FAW];
  initial begin
    foreach (nm[i]) nm[i] = '0;
    foreach (cm[i]) cm[i] = '0;
    foreach (fm[i]) fm[i] = '0;
  end
  always_ff @(posedge Clk) begin
    if (NMRdEnb) NMDataRd <= nm[NMAddr];
    if (NMWrEnb) nm[NMAddr] <= NMDataWr;
    if (CMRdEnb) CMDataRd <= cm[CMAddrRd];
    if (CMWrEnb) cm[CMAddrWr] <= CMDataWr;
    if (FMRdEnb) FMDataRd <= fm[FMAddr];
    if (FMWrEnb) fm[FMAddr] <= FMDataWr;
  end

  // access rules, checked on every clock of a run
  int cur_L = 1, cur_nets = 1, cur_pop = 1, bad_access = 0, accesses = 0;
  bit running = 0;
  always @(posedge Clk) if (ResetN && running) begin
    if ((NMRdEnb && NMWrEnb) || (FMRdEnb && FMWrEnb)) bad_access++;
    if (NMRdEnb || NMWrEnb) begin
      accesses++;
      if (int'(NMAddr[CF +: NB]) >= cur_nets || int'(NMAddr[CF-1:0]) >= cur_L) bad_access++;
    end
    if (CMRdEnb) begin
      accesses++;
      if (int'(CMAddrRd[CF +: FAW-1]) >= cur_pop + (cur_pop % 2) || int'(CMAddrRd[CF-1:0]) >= cur_L) bad_access++;
    end
    if (CMWrEnb) begin
      accesses++;
      // with an odd population the second child of the last pair goes to
      // the spare slot just past the population (never read)
      if (int'(CMAddrWr[CF +: FAW-1]) >= cur_pop + (cur_pop % 2) || int'(CMAddrWr[CF-1:0]) >= cur_L) begin
        bad_access++;
        $display("bad CM write slot %0d word %0d", CMAddrWr[CF +: FAW-1], CMAddrWr[CF-1:0]);
      end
    end
    if (FMRdEnb || FMWrEnb) begin
      accesses++;
      if (int'(FMAddr[FAW-2:0]) >= cur_pop) bad_access++;
    end
  end

  // best fitness written in the first fitness phase
  int init_best, fm_writes;
  always @(posedge Clk) if (running && FMWrEnb) begin
    if (fm_writes < cur_pop && int'(FMDataWr) < init_best) init_best = int'(FMDataWr);
    fm_writes++;
  end

  task automatic wr_reg(input logic [3:0] a, input logic [7:0] d);
    @(negedge Clk); CPUWr = 1; CPUAddr = a; CPUData = d;
    @(negedge Clk); CPUWr = 0;
  endtask

  task automatic planted(input int cells, input int nets, input int bridges, input int pop,
                         input int gens, input bit expect_opt);
    int L = (cells + W - 1) / W, nbits = L * W;
    int side [];
    logic [W-1:0] netw [][];
    logic [W-1:0] outw [][];
    int outfit [];
    int nout = 0, cyc = 0, best = 1 << 30;
    side = new[nbits];
    // padding bits count as cells of their own: keep the halves equal in
    // size over all nbits so the planted split is balanced
    foreach (side[c]) side[c] = c % 2;
    for (int i = nbits - 1; i > 0; i--) begin
      int j = $urandom % (i + 1), t = side[i];
      side[i] = side[j]; side[j] = t;
    end
    netw = new[nets];
    foreach (netw[n]) begin
      int s = n % 2, k = 0;
      netw[n] = new[L];
      foreach (netw[n][w]) netw[n][w] = '0;
      while (k < 2 + $urandom % 2) begin
        int c = $urandom % cells;
        if (side[c] == s || n < bridges) begin netw[n][c / W][c % W] = 1'b1; k++; end
      end
      if (n < bridges) begin   // make sure a bridge really spans both halves
        for (int c = 0; c < cells; c++) if (side[c] != side[0]) begin netw[n][c / W][c % W] = 1'b1; break; end
        netw[n][0][0] = 1'b1;
      end
    end
    outw = new[pop];
    foreach (outw[p]) outw[p] = new[L];
    outfit = new[pop];
    cur_L = L; cur_nets = nets; cur_pop = pop;
    wr_reg(4'h0, 8'(L - 1));    wr_reg(4'h1, 8'hA5);   // upper bytes unused at these widths
    wr_reg(4'h2, 8'(nets - 1)); wr_reg(4'h3, 8'h5A);
    wr_reg(4'h4, 8'(pop - 1));  wr_reg(4'h5, 8'(gens - 1));
    wr_reg(4'h6, 8'd252);       wr_reg(4'h7, 8'd3);
    init_best = 1 << 30; fm_writes = 0; bad_access = 0; accesses = 0; running = 1;
    @(negedge Clk); StartGA = 1; @(negedge Clk); StartGA = 0;
    for (int n = 0; n < nets; n++)
      for (int w = 0; w < L; w++) begin
        NetlistVld = 1; NetlistIn = netw[n][w];
        @(negedge Clk);
      end
    NetlistVld = 0;
    while (!GADone && cyc < 1000000) begin
      @(posedge Clk); #1 cyc++;
      if (PopOutVld) begin
        int p = nout / L, w = nout % L;
        if (p < pop) begin outw[p][w] = PopOut; outfit[p] = int'(FitnessOut); end
        nout++;
      end
    end
    running = 0;
    check(GADone, "GADone");
    check(nout == pop * L, $sformatf("output words %0d", nout));
    check(bad_access == 0 && accesses > 0, $sformatf("memory access rules (%0d bad of %0d)", bad_access, accesses));
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
      check(outfit[p] == cuts, $sformatf("chromosome %0d fitness %0d, recomputed %0d", p, outfit[p], cuts));
      for (int w = 0; w < L; w++) ones += $countones(outw[p][w]);
      check(2 * ones - nbits <= 1 && nbits - 2 * ones <= 1, $sformatf("chromosome %0d balance %0d/%0d", p, ones, nbits));
      if (outfit[p] < best) best = outfit[p];
    end
    check(best <= init_best, $sformatf("best final %0d <= best initial %0d", best, init_best));
    if (expect_opt) check(best <= bridges, $sformatf("planted optimum %0d reached (best %0d)", bridges, best));
    $display("W=%0d planted cells=%0d nets=%0d bridges=%0d pop=%0d gens=%0d: initial best %0d, final best %0d, %0d clocks",
             W, cells, nets, bridges, pop, gens, init_best, best, cyc);
  endtask

  initial begin
    Finished = 0;
    repeat (3) @(posedge Clk);
    #1 ResetN = 1;
    planted(8 * CellScale, 10, 1, 16, 15, CellScale == 1);
    planted(12 * CellScale, 16, 2, 20, 20, 0);
    planted(30 * CellScale, 32, 3, 32, 30, 0);
    planted(32 * CellScale, 32, 4, 31, 10, 0);   // odd population: last pair has one child
    Finished = 1;
  end
endmodule
