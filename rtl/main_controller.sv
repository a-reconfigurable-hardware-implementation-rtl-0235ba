// main_controller: sequencer of the GA processor.
//
// After a StartGA pulse it
//   1. takes the netlist from NetlistIn, one word per clock while NetlistVld
//      is high, net after net, and writes it to netlist memory address
//      {net, word} ((NetNum+1) nets of CMLength+1 words);
//   2. fills the low half of the chromosome memory with PopSiz+1 random
//      chromosomes, one word per clock, and balances each one (random bits
//      of the larger partition are flipped until the counts of ones and
//      zeros differ by at most one, the rule the crossover block applies to
//      children);
//   3. has the fitness block evaluate them (FitnessEnb held until FitnessDone);
//   4. for each of GenNum+1 generations: repeats selection (SelectionEnb until
//      SelectionDone) and crossover/mutation (CrossoverEnb until CrossoverDone,
//      children at slots 2k and 2k+1) until the child half holds PopSiz+1
//      children, copies the best parent over the last child slot (elitism),
//      swaps the halves (HighBank) and has the new parents evaluated;
//   5. streams out the final population: each chromosome word on PopOut with
//      PopOutVld high and the chromosome's fitness on FitnessOut, and ends
//      with a one-clock GADone pulse.
// While no block enable is high the controller owns the memories.
//
// The order of operations, the bank scheme, the enable/done handshake, the
// random initial population, the best individual carried into the next
// generation and the output stream follow the published description. Own
// choices: the initial chromosomes are balanced too (otherwise an unbalanced,
// low-cut random chromosome could survive as the elite), the elite goes to
// the last slot, the enables are held as levels
// until the done pulse (they also steer the memory multiplexer), and the
// output pauses two clocks between chromosomes to fetch the next fitness.
//
// Timing: netlist words are accepted on any clock with NetlistVld high; the
// initial fill takes one clock per word plus one clock per chromosome and
// three per balancing attempt; the elite copy takes two clocks per word; the
// output gives one word per clock within a chromosome.
//
// Some outputs are plain wires or constants by design: PopOut is the
// chromosome memory's read data, NMDataWr is NetlistIn, and the lowest bit
// of Child1Addr / Child2Addr is always 0 / 1 (children go to slots 2k and
// 2k+1).
module main_controller #(
  parameter int FMAddrWidth   = 9,
  parameter int FMDataWidth   = 8,
  parameter int CMDataWidth   = 8,
  parameter int CMField       = 8,
  parameter int MaxNetNumBits = 8,
  parameter logic [31:0] SEED = 32'h0A1C_3E55
) (
  input  logic                             Clk,
  input  logic                             ResetN,
  // top-level interface
  input  logic                             StartGA,
  input  logic                             NetlistVld,
  input  logic [CMDataWidth-1:0]           NetlistIn,
  output logic [CMDataWidth-1:0]           PopOut,
  output logic                             PopOutVld,
  output logic [FMDataWidth-1:0]           FitnessOut,
  output logic                             GADone,
  // control registers
  input  logic [CMField-1:0]               CMLength,
  input  logic [MaxNetNumBits-1:0]         NetNum,
  input  logic [7:0]                       PopSiz,
  input  logic [7:0]                       GenNum,
  // block handshakes
  output logic                             SelectionEnb,
  input  logic                             SelectionDone,
  output logic                             CrossoverEnb,
  input  logic                             CrossoverDone,
  output logic [FMAddrWidth-2:0]           Child1Addr,
  output logic [FMAddrWidth-2:0]           Child2Addr,
  output logic                             FitnessEnb,
  input  logic                             FitnessDone,
  input  logic [FMAddrWidth-2:0]           BestAddr,
  output logic                             HighBank,
  // memories
  output logic [MaxNetNumBits+CMField-1:0] NMAddrWr,
  output logic [CMDataWidth-1:0]           NMDataWr,
  output logic                             NMWrEnb,
  output logic [FMAddrWidth+CMField-1:0]   CMAddrRd,
  input  logic [CMDataWidth-1:0]           CMDataRd,
  output logic                             CMRdEnb,
  output logic [FMAddrWidth+CMField-1:0]   CMAddrWr,
  output logic [CMDataWidth-1:0]           CMDataWr,
  output logic                             CMWrEnb,
  output logic [FMAddrWidth-1:0]           FMAddrRd,
  input  logic [FMDataWidth-1:0]           FMDataRd,
  output logic                             FMRdEnb
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_INIT, S_IN_EVAL, S_IN_RD, S_IN_CHK, S_FIT, S_SEL, S_XO,
    S_EL_RD, S_EL_WR, S_SWAP, S_OUT_F, S_OUT_C, S_OUT_W, S_GADONE
  } state_e;
  state_e state;

  logic [31:0]              rnd;
  logic [MaxNetNumBits-1:0] nc;        // netlist counter
  logic [CMField-1:0]       wc;        // chromosome word counter
  logic [FMAddrWidth-2:0]   pc;        // population (chromosome) counter
  logic [FMAddrWidth-3:0]   kc;        // child pair counter
  logic [8:0]               gc;        // generation counter
  logic [FMAddrWidth-2:0]   last_slot;

  // balance repair of the initial population
  localparam int IW = (CMDataWidth > 1) ? $clog2(CMDataWidth) : 1;
  localparam int CW = CMField + IW + 2;
  logic [CW-1:0]            ones, nbits;
  logic signed [CW:0]       diff;
  logic [CMField+8:0]       scaled;
  logic [CMField-1:0]       rp_word;
  logic [IW-1:0]            rp_bit;
  logic                     rp_val;

  lfsr_rng #(.SEED(SEED)) u_rng (
    .Clk(Clk), .ResetN(ResetN), .advance(1'b1), .rnd(rnd)
  );

  assign last_slot  = (FMAddrWidth-1)'(PopSiz);
  assign nbits      = CW'((32'(CMLength) + 1) * CMDataWidth);
  assign diff       = $signed({ones, 1'b0}) - $signed({1'b0, nbits});
  assign scaled     = (CMField+9)'(rnd[31:24]) * (CMField+9)'(32'(CMLength) + 1);
  assign Child1Addr = {kc, 1'b0};
  assign Child2Addr = {kc, 1'b1};

  assign SelectionEnb = (state == S_SEL);
  assign CrossoverEnb = (state == S_XO);
  assign FitnessEnb   = (state == S_FIT);
  assign GADone       = (state == S_GADONE);
  assign PopOutVld    = (state == S_OUT_W);
  assign PopOut       = CMDataRd;

  // Memory requests.
  always_comb begin
    NMAddrWr = {nc, wc};
    NMDataWr = NetlistIn;
    NMWrEnb  = (state == S_LOAD) && NetlistVld;
    CMRdEnb  = 1'b0;
    CMAddrRd = {HighBank, pc, wc};
    CMWrEnb  = 1'b0;
    CMAddrWr = {HighBank, pc, wc};
    CMDataWr = rnd[CMDataWidth-1:0];
    FMRdEnb  = (state == S_OUT_F);
    FMAddrRd = {HighBank, pc};
    unique case (state)
      S_INIT:  CMWrEnb = 1'b1;
      S_IN_RD: begin
        CMRdEnb  = 1'b1;
        CMAddrRd = {HighBank, pc, rp_word};
      end
      S_IN_CHK: begin
        CMWrEnb  = (CMDataRd[rp_bit] == rp_val);
        CMAddrWr = {HighBank, pc, rp_word};
        CMDataWr = CMDataRd ^ (CMDataWidth'(1) << rp_bit);
      end
      S_EL_RD: begin
        CMRdEnb  = 1'b1;
        CMAddrRd = {HighBank, BestAddr, wc};
      end
      S_EL_WR: begin
        CMWrEnb  = 1'b1;
        CMAddrWr = {~HighBank, last_slot, wc};
        CMDataWr = CMDataRd;
      end
      S_OUT_C: begin
        CMRdEnb  = 1'b1;
        CMAddrRd = {HighBank, pc, CMField'(0)};
      end
      S_OUT_W: begin
        CMRdEnb  = (wc != CMLength);
        CMAddrRd = {HighBank, pc, CMField'(wc + 1'b1)};
      end
      default: ;
    endcase
  end

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN) begin
      state      <= S_IDLE;
      nc         <= '0;
      wc         <= '0;
      pc         <= '0;
      kc         <= '0;
      gc         <= '0;
      HighBank   <= 1'b0;
      FitnessOut <= '0;
      ones       <= '0;
      rp_word    <= '0;
      rp_bit     <= '0;
      rp_val     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (StartGA) begin
          nc       <= '0;
          wc       <= '0;
          pc       <= '0;
          gc       <= '0;
          ones     <= '0;
          HighBank <= 1'b0;
          state    <= S_LOAD;
        end
        S_LOAD: if (NetlistVld) begin
          if (wc != CMLength) begin
            wc <= wc + 1'b1;
          end else begin
            wc <= '0;
            nc <= nc + 1'b1;
            if (nc == NetNum) state <= S_INIT;
          end
        end
        S_INIT: begin
          ones <= ones + CW'($countones(rnd[CMDataWidth-1:0]));
          if (wc != CMLength) begin
            wc <= wc + 1'b1;
          end else begin
            wc    <= '0;
            state <= S_IN_EVAL;
          end
        end
        S_IN_EVAL: begin
          if (diff > 1 || diff < -1) begin
            rp_val  <= (diff > 0);
            rp_word <= CMField'(scaled[CMField+7:8]);
            rp_bit  <= rnd[16 +: IW];
            state   <= S_IN_RD;
          end else begin
            ones  <= '0;
            pc    <= pc + 1'b1;
            state <= (pc == last_slot) ? S_FIT : S_INIT;
          end
        end
        S_IN_RD: state <= S_IN_CHK;
        S_IN_CHK: begin
          if (CMDataRd[rp_bit] == rp_val) ones <= rp_val ? ones - 1'b1 : ones + 1'b1;
          state <= S_IN_EVAL;
        end
        S_FIT: if (FitnessDone) begin
          pc <= '0;
          wc <= '0;
          kc <= '0;
          state <= (gc == {1'b0, GenNum} + 9'd1) ? S_OUT_F : S_SEL;
        end
        S_SEL: if (SelectionDone) state <= S_XO;
        S_XO: if (CrossoverDone) begin
          kc <= kc + 1'b1;
          // all PopSiz+1 children written once slot 2k+1 >= PopSiz
          if ({1'b0, kc, 1'b1} >= {1'b0, last_slot}) begin
            wc    <= '0;
            state <= S_EL_RD;
          end else begin
            state <= S_SEL;
          end
        end
        S_EL_RD: state <= S_EL_WR;
        S_EL_WR: begin
          wc    <= wc + 1'b1;
          state <= (wc == CMLength) ? S_SWAP : S_EL_RD;
        end
        S_SWAP: begin
          HighBank <= ~HighBank;
          gc       <= gc + 1'b1;
          state    <= S_FIT;
        end
        S_OUT_F: state <= S_OUT_C;
        S_OUT_C: begin
          FitnessOut <= FMDataRd;
          wc         <= '0;
          state      <= S_OUT_W;
        end
        S_OUT_W: begin
          if (wc != CMLength) begin
            wc <= wc + 1'b1;
          end else begin
            wc <= '0;
            pc <= pc + 1'b1;
            state <= (pc == last_slot) ? S_GADONE : S_OUT_F;
          end
        end
        S_GADONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
