// selection: tournament selection of two parents.
//
// While SelectionEnb is high the block runs two tournaments. For each one it
// draws two random population indices, reads their fitness values from the
// parent half of the fitness memory (the half chosen by HighBank), latches
// them in two fitness registers and keeps the index whose fitness is smaller
// (fewer cut nets is better; a tie keeps the first draw). The winner of the
// first tournament goes to Parent1Addr, of the second to Parent2Addr; both
// are held until the block is enabled again. A one-cycle SelectionDone pulse
// ends the operation; the block then waits for SelectionEnb to fall.
//
// Structure (random number generator, address registers, fitness registers,
// unsigned comparator, parent registers, control state machine) and the
// interface follow the published description. Own choices: a random index is
// the top byte of the LFSR scaled into 0..PopSiz by (r*(PopSiz+1))>>8, which
// works for any population size; PopSiz holds the population size minus one.
//
// Timing: fitness memory reads have one cycle of latency. One tournament takes
// four clocks (read A, read B, latch B, compare); SelectionDone is high in
// the ninth clock after the edge at which SelectionEnb is seen in idle.
//
// The top bit of FMAddrRd is HighBank itself: the block always reads the
// parents' fitness half.
module selection #(
  parameter int FMAddrWidth = 9,
  parameter int FMDataWidth = 8,
  parameter logic [31:0] SEED = 32'h5EC1_0A11
) (
  input  logic                   Clk,
  input  logic                   ResetN,
  input  logic [7:0]             PopSiz,
  input  logic                   SelectionEnb,
  input  logic                   HighBank,
  output logic                   SelectionDone,
  output logic [FMAddrWidth-2:0] Parent1Addr,
  output logic [FMAddrWidth-2:0] Parent2Addr,
  output logic [FMAddrWidth-1:0] FMAddrRd,
  input  logic [FMDataWidth-1:0] FMDataRd,
  output logic                   FMRdEnb
);

  typedef enum logic [2:0] {S_IDLE, S_RD_A, S_RD_B, S_LATCH, S_CMP, S_DONE, S_WAIT} state_e;
  state_e state;

  logic [31:0]            rnd;
  logic                   second;          // working on the second tournament
  logic [FMAddrWidth-2:0] addr_reg1, addr_reg2;
  logic [FMDataWidth-1:0] fit_reg1, fit_reg2;
  logic [FMAddrWidth-2:0] rnd_idx;
  logic [16:0]            scaled;

  lfsr_rng #(.SEED(SEED)) u_rng (
    .Clk(Clk), .ResetN(ResetN),
    .advance(state == S_RD_A || state == S_RD_B),
    .rnd(rnd)
  );

  // Random index in 0..PopSiz (PopSiz = population size - 1).
  assign scaled  = 17'(rnd[31:24]) * 17'({1'b0, PopSiz} + 9'd1);
  assign rnd_idx = (FMAddrWidth-1)'(scaled[16:8]);

  assign SelectionDone = (state == S_DONE);
  assign FMRdEnb  = (state == S_RD_A) || (state == S_RD_B);
  assign FMAddrRd = {HighBank, rnd_idx};

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN) begin
      state         <= S_IDLE;
      second        <= 1'b0;
      addr_reg1     <= '0;
      addr_reg2     <= '0;
      fit_reg1      <= '0;
      fit_reg2      <= '0;
      Parent1Addr   <= '0;
      Parent2Addr   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (SelectionEnb) begin
          second <= 1'b0;
          state  <= S_RD_A;
        end
        S_RD_A: begin
          addr_reg1 <= rnd_idx;
          state     <= S_RD_B;
        end
        S_RD_B: begin
          addr_reg2 <= rnd_idx;
          fit_reg1  <= FMDataRd;
          state     <= S_LATCH;
        end
        S_LATCH: begin
          fit_reg2 <= FMDataRd;
          state    <= S_CMP;
        end
        S_CMP: begin
          if (!second) Parent1Addr <= (fit_reg2 < fit_reg1) ? addr_reg2 : addr_reg1;
          else         Parent2Addr <= (fit_reg2 < fit_reg1) ? addr_reg2 : addr_reg1;
          second <= 1'b1;
          state  <= second ? S_DONE : S_RD_A;
        end
        S_DONE: state <= S_WAIT;
        S_WAIT: if (!SelectionEnb) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
