// tb_mem_mux: routing of the memory multiplexer.
//
// Random values on every block-side input, and each of the four ownership
// cases (none, selection, crossover, fitness active). The expected memory-side
// outputs are written out case by case from the ownership table; read data
// must reach every block unchanged, and enables of blocks that do not own a
// memory must not reach it.
module tb_mem_mux;
  localparam int FAW = 9, FDW = 8, W = 8, CF = 8, NB = 8;
  localparam int CAW = FAW + CF, NAW = NB + CF;
  logic SelectionActive, CrossoverActive, FitnessActive;
  logic [FAW-1:0] FMAddrRdSM, FMAddrWrFM, FMAddrRdMC, FMAddr;
  logic [FDW-1:0] FMDataRdSM, FMDataWrFM, FMDataRdMC, FMDataRd, FMDataWr;
  logic FMRdEnbSM, FMWrEnbFM, FMRdEnbMC, FMRdEnb, FMWrEnb;
  logic [CAW-1:0] CMAddrRdCM, CMAddrWrCM, CMAddrRdFM, CMAddrRdMC, CMAddrWrMC, CMAddrRd, CMAddrWr;
  logic [W-1:0] CMDataRdCM, CMDataWrCM, CMDataRdFM, CMDataRdMC, CMDataWrMC, CMDataRd, CMDataWr;
  logic CMRdEnbCM, CMWrEnbCM, CMRdEnbFM, CMRdEnbMC, CMWrEnbMC, CMRdEnb, CMWrEnb;
  logic [NAW-1:0] NMAddrRdFM, NMAddrWrMC, NMAddr;
  logic [W-1:0] NMDataRdFM, NMDataWrMC, NMDataWr, NMDataRd;
  logic NMRdEnbFM, NMWrEnbMC, NMWrEnb, NMRdEnb;
  int checks = 0, failures = 0;

  mem_mux #(.FMAddrWidth(FAW), .FMDataWidth(FDW), .CMDataWidth(W), .CMField(CF),
            .MaxNetNumBits(NB)) dut (.*);

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
    for (int i = 0; i < 2000; i++) begin
      automatic int mode = i % 4;
      SelectionActive = (mode == 1); CrossoverActive = (mode == 2); FitnessActive = (mode == 3);
      FMAddrRdSM = FAW'($urandom); FMAddrWrFM = FAW'($urandom); FMAddrRdMC = FAW'($urandom);
      FMDataWrFM = FDW'($urandom); FMDataRd = FDW'($urandom);
      {FMRdEnbSM, FMWrEnbFM, FMRdEnbMC} = 3'($urandom);
      CMAddrRdCM = CAW'($urandom); CMAddrWrCM = CAW'($urandom); CMAddrRdFM = CAW'($urandom);
      CMAddrRdMC = CAW'($urandom); CMAddrWrMC = CAW'($urandom);
      CMDataWrCM = W'($urandom); CMDataWrMC = W'($urandom); CMDataRd = W'($urandom);
      {CMRdEnbCM, CMWrEnbCM, CMRdEnbFM, CMRdEnbMC, CMWrEnbMC} = 5'($urandom);
      NMAddrRdFM = NAW'($urandom); NMAddrWrMC = NAW'($urandom);
      NMDataWrMC = W'($urandom); NMDataRd = W'($urandom);
      {NMRdEnbFM, NMWrEnbMC} = 2'($urandom);
      #1;
      check(FMDataRdSM == FMDataRd && FMDataRdMC == FMDataRd, "FM read data fan-out");
      check(CMDataRdCM == CMDataRd && CMDataRdFM == CMDataRd && CMDataRdMC == CMDataRd, "CM read data fan-out");
      check(NMDataRdFM == NMDataRd, "NM read data");
      check(FMDataWr == FMDataWrFM, "FM write data");
      case (mode)
        0: begin
          check(FMAddr == FMAddrRdMC && FMRdEnb == FMRdEnbMC && !FMWrEnb, "idle FM");
          check(CMAddrRd == CMAddrRdMC && CMRdEnb == CMRdEnbMC, "idle CM read");
          check(CMAddrWr == CMAddrWrMC && CMDataWr == CMDataWrMC && CMWrEnb == CMWrEnbMC, "idle CM write");
          check(NMAddr == NMAddrWrMC && NMDataWr == NMDataWrMC && NMWrEnb == NMWrEnbMC && !NMRdEnb, "idle NM");
        end
        1: begin
          check(FMAddr == FMAddrRdSM && FMRdEnb == FMRdEnbSM && !FMWrEnb, "selection FM");
          check(!CMWrEnb && !CMRdEnb && !NMWrEnb && !NMRdEnb, "selection others quiet");
        end
        2: begin
          check(CMAddrRd == CMAddrRdCM && CMRdEnb == CMRdEnbCM, "crossover CM read");
          check(CMAddrWr == CMAddrWrCM && CMDataWr == CMDataWrCM && CMWrEnb == CMWrEnbCM, "crossover CM write");
          check(!FMWrEnb && !FMRdEnb && !NMWrEnb && !NMRdEnb, "crossover others quiet");
        end
        default: begin
          check(FMAddr == FMAddrWrFM && FMWrEnb == FMWrEnbFM && !FMRdEnb, "fitness FM");
          check(CMAddrRd == CMAddrRdFM && CMRdEnb == CMRdEnbFM && !CMWrEnb, "fitness CM");
          check(NMAddr == NMAddrRdFM && NMRdEnb == NMRdEnbFM && !NMWrEnb, "fitness NM");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
