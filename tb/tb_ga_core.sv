// tb_ga_core: the processor core at reduced and widened generic sizes, on
// planted-partition problems whose best cut is known.
//
// Two benches (ga_core_bench) run side by side, each with its own core and
// memories:
//  - 4-bit chromosome words, at most 8 words per chromosome, 32 nets and 32
//    individuals (FMAddrWidth 6, CMDataWidth 4, CMField 3, MaxNetNumBits 5),
//    which takes every width generic below its default;
//  - 16-bit chromosome words (CMDataWidth 16, the wider setting used in the
//    timing tables), same other sizes, with four times the cells.
// The testbench adds up the checks of both benches once both have finished.
module tb_ga_core;
  int checks4, failures4, checks16, failures16;
  bit done4, done16;
  int checks, failures;

  ga_core_bench #(.FAW(6), .FDW(8), .W(4),  .CF(3), .NB(5), .CellScale(1))
    u_w4  (.Checks(checks4),  .Failures(failures4),  .Finished(done4));
  ga_core_bench #(.FAW(6), .FDW(8), .W(16), .CF(3), .NB(5), .CellScale(4))
    u_w16 (.Checks(checks16), .Failures(failures16), .Finished(done16));

  initial begin
    wait (done4 && done16);
    checks   = checks4 + checks16;
    failures = failures4 + failures16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog, counted in units of the benches' 10-unit clock period
  initial begin
    #(10 * 3000000);
    checks   = checks4 + checks16;
    failures = failures4 + failures16 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
