// crossover: uniform crossover, mutation and balance repair of two children.
//
// While CrossoverEnb is high the block builds two children from the parents
// at Parent1Addr and Parent2Addr (parent half of the chromosome memory, chosen
// by HighBank) and writes them to Child1Addr and Child2Addr in the other half.
// A chromosome is CMLength+1 consecutive memory words; the memory address of a
// word is {bank, chromosome index, word counter}.
//
// Per word: both parent words are read, a fresh random word is used as the
// uniform-crossover mask (child1 takes parent1 where the mask bit is 1 and
// parent2 elsewhere, child2 the opposite), and an 8-bit random sample below
// MutationRate flips one random bit in each child word. Whether the pair is
// crossed at all is decided once per pair by an 8-bit sample against
// CrossoverRate; otherwise the parents are copied (mutation still applies).
// The ones of each child are counted as its words are written.
//
// Repair: a child whose count of ones and zeros differ by more than one is
// brought back to balance by picking random bits; a picked bit that lies in
// the larger partition is flipped (read, then write back), otherwise another
// bit is picked. CrossoverDone is then high for one clock and the block waits
// for CrossoverEnb to fall.
//
// The word counter, the address generation, the random mask, the rate
// comparisons and the ones/zeros-count repair follow the published
// description. Own choices: one crossover decision per pair, one mutation
// sample per word, the LFSR field assignment, and counting the padding bits of
// the last word in the balance (the chromosome length is known only in
// words). CMDataWidth must be a power of two of at most 16.
//
// Timing: CrossoverDone is high in clock 4*(CMLength+1) + 3*A + 3 after the
// edge that sees CrossoverEnb: one start clock, four clocks per word (read
// parent1, read parent2, write child1, write child2), three clocks per repair
// attempt (pick, read, flip) for A attempts, one balance check per child.
module crossover #(
  parameter int FMAddrWidth = 9,
  parameter int CMDataWidth = 8,
  parameter int CMField     = 8,
  parameter logic [31:0] SEED = 32'hC055_0E12
) (
  input  logic                           Clk,
  input  logic                           ResetN,
  input  logic [7:0]                     CrossoverRate,
  input  logic [7:0]                     MutationRate,
  input  logic [CMField-1:0]             CMLength,
  input  logic                           CrossoverEnb,
  output logic                           CrossoverDone,
  input  logic                           HighBank,
  input  logic [FMAddrWidth-2:0]         Parent1Addr,
  input  logic [FMAddrWidth-2:0]         Parent2Addr,
  input  logic [FMAddrWidth-2:0]         Child1Addr,
  input  logic [FMAddrWidth-2:0]         Child2Addr,
  output logic [FMAddrWidth+CMField-1:0] CMAddrRd,
  input  logic [CMDataWidth-1:0]         CMDataRd,
  output logic                           CMRdEnb,
  output logic [FMAddrWidth+CMField-1:0] CMAddrWr,
  output logic [CMDataWidth-1:0]         CMDataWr,
  output logic                           CMWrEnb
);

  localparam int IW = (CMDataWidth > 1) ? $clog2(CMDataWidth) : 1;
  localparam int CW = CMField + IW + 2;   // width of the ones counters

  typedef enum logic [3:0] {
    S_IDLE, S_RD1, S_RD2, S_WR1, S_WR2,
    S_RP_EVAL, S_RP_RD, S_RP_CHK, S_DONE, S_WAIT
  } state_e;
  state_e state;

  logic [31:0]            rnd;
  logic                   do_cross;
  logic [CMField-1:0]     wcnt;
  logic [CMDataWidth-1:0] p1_word, c2_word;
  logic [CMDataWidth-1:0] mask, c1_next, c2_next;
  logic [CW-1:0]          ones1, ones2, nbits;
  logic                   rp_child2;      // repairing child 2
  logic [CMField-1:0]     rp_word;
  logic [IW-1:0]          rp_bit;
  logic                   rp_val;         // value of the majority partition
  logic [CW-1:0]          ones_cur;
  logic signed [CW:0]     diff;
  logic [CMField+8:0]     scaled;

  lfsr_rng #(.SEED(SEED)) u_rng (
    .Clk(Clk), .ResetN(ResetN),
    .advance(state == S_IDLE || state == S_RD1 || state == S_RP_EVAL),
    .rnd(rnd)
  );

  // Children of the current word: p1_word registered, parent2 on CMDataRd.
  always_comb begin
    mask = rnd[CMDataWidth-1:0];
    if (do_cross) begin
      c1_next = (p1_word & mask) | (CMDataRd & ~mask);
      c2_next = (CMDataRd & mask) | (p1_word & ~mask);
    end else begin
      c1_next = p1_word;
      c2_next = CMDataRd;
    end
    if (rnd[31:24] < MutationRate) begin
      c1_next[rnd[16 +: IW]] = ~c1_next[rnd[16 +: IW]];
      c2_next[rnd[20 +: IW]] = ~c2_next[rnd[20 +: IW]];
    end
  end

  // Balance of the child under repair: ones - zeros = 2*ones - nbits.
  assign nbits    = CW'((32'(CMLength) + 1) * CMDataWidth);
  assign ones_cur = rp_child2 ? ones2 : ones1;
  assign diff     = $signed({ones_cur, 1'b0}) - $signed({1'b0, nbits});
  assign scaled   = (CMField+9)'(rnd[31:24]) * (CMField+9)'(32'(CMLength) + 1);

  // Chromosome memory ports.
  always_comb begin
    CMRdEnb  = 1'b0;
    CMAddrRd = {HighBank, Parent1Addr, wcnt};
    CMWrEnb  = 1'b0;
    CMAddrWr = {~HighBank, Child1Addr, wcnt};
    CMDataWr = c1_next;
    unique case (state)
      S_RD1: CMRdEnb = 1'b1;
      S_RD2: begin
        CMRdEnb  = 1'b1;
        CMAddrRd = {HighBank, Parent2Addr, wcnt};
      end
      S_WR1: CMWrEnb = 1'b1;
      S_WR2: begin
        CMWrEnb  = 1'b1;
        CMAddrWr = {~HighBank, Child2Addr, wcnt};
        CMDataWr = c2_word;
      end
      S_RP_RD: begin
        CMRdEnb  = 1'b1;
        CMAddrRd = {~HighBank, rp_child2 ? Child2Addr : Child1Addr, rp_word};
      end
      S_RP_CHK: begin
        CMWrEnb  = (CMDataRd[rp_bit] == rp_val);
        CMAddrWr = {~HighBank, rp_child2 ? Child2Addr : Child1Addr, rp_word};
        CMDataWr = CMDataRd ^ (CMDataWidth'(1) << rp_bit);
      end
      default: ;
    endcase
  end

  assign CrossoverDone = (state == S_DONE);

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN) begin
      state     <= S_IDLE;
      do_cross  <= 1'b0;
      wcnt      <= '0;
      p1_word   <= '0;
      c2_word   <= '0;
      ones1     <= '0;
      ones2     <= '0;
      rp_child2 <= 1'b0;
      rp_word   <= '0;
      rp_bit    <= '0;
      rp_val    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (CrossoverEnb) begin
          do_cross  <= (rnd[31:24] < CrossoverRate);
          wcnt      <= '0;
          ones1     <= '0;
          ones2     <= '0;
          rp_child2 <= 1'b0;
          state     <= S_RD1;
        end
        S_RD1: state <= S_RD2;
        S_RD2: begin
          p1_word <= CMDataRd;
          state   <= S_WR1;
        end
        S_WR1: begin
          c2_word <= c2_next;
          ones1   <= ones1 + CW'($countones(c1_next));
          ones2   <= ones2 + CW'($countones(c2_next));
          state   <= S_WR2;
        end
        S_WR2: begin
          wcnt  <= wcnt + 1'b1;
          state <= (wcnt == CMLength) ? S_RP_EVAL : S_RD1;
        end
        S_RP_EVAL: begin
          if (diff > 1 || diff < -1) begin
            rp_val  <= (diff > 0);
            rp_word <= CMField'(scaled[CMField+7:8]);
            rp_bit  <= rnd[16 +: IW];
            state   <= S_RP_RD;
          end else if (!rp_child2) begin
            rp_child2 <= 1'b1;
          end else begin
            state <= S_DONE;
          end
        end
        S_RP_RD: state <= S_RP_CHK;
        S_RP_CHK: begin
          if (CMDataRd[rp_bit] == rp_val) begin
            if (rp_child2) ones2 <= rp_val ? ones2 - 1'b1 : ones2 + 1'b1;
            else           ones1 <= rp_val ? ones1 - 1'b1 : ones1 + 1'b1;
          end
          state <= S_RP_EVAL;
        end
        S_DONE: state <= S_WAIT;
        S_WAIT: if (!CrossoverEnb) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (CMDataWidth <= 16 && (CMDataWidth & (CMDataWidth - 1)) == 0)
      else $error("crossover: CMDataWidth must be a power of two of at most 16");
  end

endmodule
