// ga_ctl_reg: the GA-enable bit of the bus-side register peripheral.
//
// The host starts a run by writing 1 to this bit (EnbGACtl). While it is set
// the GA controller owns the SSRAM and runs the processor; when the results
// are stored the GA controller pulses GACtlReset and the bit clears itself.
// The host polls the bit and reads the results once it reads 0. A host write
// of 0 clears the bit early (the GA controller then waits in its final state
// until the bit is low, as it does after a normal run).
//
// Interface and timing: CtlWr is a one-clock write strobe with the new value
// on CtlWrData; EnbGACtl changes on the clock edge that samples the strobe
// or GACtlReset. If both arrive in the same clock, GACtlReset wins, so a run
// that has just ended is never restarted by a stale write. EnbGACtl is also
// the value the host reads back. Reset clears the bit.
//
// The document gives the bit's behaviour (set by the host, cleared by
// GACtlReset, polled by the host); its register address and bus protocol
// are those of the board's bus slave logic, which lies outside this design,
// and the priority rule is this design's own choice.
module ga_ctl_reg (
  input  logic Clk,
  input  logic ResetN,
  input  logic CtlWr,        // host write strobe
  input  logic CtlWrData,    // value written
  input  logic GACtlReset,   // clear request from the GA controller
  output logic EnbGACtl      // GA enable, read back by the host
);

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN)         EnbGACtl <= 1'b0;
    else if (GACtlReset) EnbGACtl <= 1'b0;
    else if (CtlWr)      EnbGACtl <= CtlWrData;
  end

endmodule
