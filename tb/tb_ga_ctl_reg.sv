// tb_ga_ctl_reg: random host writes and clear requests against a reference
// model of the GA-enable bit.
//
// Each clock the testbench drives a random write strobe, write value and
// clear request, predicts the bit (clear request first, then the write,
// otherwise hold) and compares after the edge. Reset is applied twice, once
// with the bit set, and must clear it. Every case is counted: set, clear by
// write, clear by GACtlReset, and a write and a clear request in the same
// clock.
module tb_ga_ctl_reg;
  logic Clk = 0, ResetN = 0;
  logic CtlWr = 0, CtlWrData = 0, GACtlReset = 0;
  logic EnbGACtl;
  int checks = 0, failures = 0;
  int n_set = 0, n_wclr = 0, n_rclr = 0, n_both = 0;
  logic model = 0;

  ga_ctl_reg dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge Clk);
    #1 check(EnbGACtl == 1'b0, "reset value");
    ResetN = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge Clk);
      CtlWr      = ($urandom % 3 == 0);
      CtlWrData  = ($urandom % 4 != 0);
      GACtlReset = model && ($urandom % 5 == 0);
      if (GACtlReset && CtlWr && CtlWrData) n_both++;
      if (GACtlReset && model) n_rclr++;
      else if (CtlWr && CtlWrData && !model) n_set++;
      else if (CtlWr && !CtlWrData && model) n_wclr++;
      if (GACtlReset) model = 1'b0;
      else if (CtlWr) model = CtlWrData;
      @(posedge Clk); #1;
      check(EnbGACtl == model, $sformatf("step %0d: bit %0b, expected %0b", i, EnbGACtl, model));
      if (i == 2000) begin
        // asynchronous reset with the bit set
        @(negedge Clk); CtlWr = 1; CtlWrData = 1; GACtlReset = 0;
        @(negedge Clk); CtlWr = 0;
        check(EnbGACtl == 1'b1, "set before reset");
        #2 ResetN = 0; #1;
        check(EnbGACtl == 1'b0, "asynchronous reset clears the bit");
        @(negedge Clk); ResetN = 1; model = 1'b0;
      end
    end
    check(n_set > 0 && n_wclr > 0 && n_rclr > 0 && n_both > 0,
          $sformatf("cases seen: set %0d, write clear %0d, reset clear %0d, both %0d", n_set, n_wclr, n_rclr, n_both));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
