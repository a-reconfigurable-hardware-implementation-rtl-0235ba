// tb_lfsr_rng: checks the LFSR random number generator against an
// independent bit-serial model of the polynomial x^32+x^22+x^2+x+1: reset
// value, hold while advance is low, 5000 steps of the sequence, and that the
// state does not return to the seed within them.
module tb_lfsr_rng;
  logic Clk = 0, ResetN = 0, advance = 0;
  logic [31:0] rnd, model;
  int checks = 0, failures = 0;
  localparam logic [31:0] SEED = 32'hDEAD_BEEF;

  lfsr_rng #(.SEED(SEED)) dut (.Clk, .ResetN, .advance, .rnd);

  always #5 Clk = ~Clk;

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] n;
    logic fb = s[0];
    n = s >> 1;
    if (fb) begin
      n[31] = 1'b1;      // x^32 term
      n[21] = ~n[21];    // x^22
      n[1]  = ~n[1];     // x^2
      n[0]  = ~n[0];     // x^1
    end
    return n;
  endfunction

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge Clk);
    #1 check(rnd == SEED, "reset value");
    ResetN = 1;
    repeat (3) @(posedge Clk);
    #1 check(rnd == SEED, "holds without advance");
    model = SEED;
    advance = 1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge Clk);
      #1 model = step(model);
      check(rnd == model, $sformatf("step %0d: %h vs %h", i, rnd, model));
      if (rnd == SEED) begin failures++; $display("FAIL: short period"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
