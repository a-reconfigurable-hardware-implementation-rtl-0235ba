// fitness: cut-size fitness of every chromosome in the parent population.
//
// A chromosome holds one bit per cell (1 = partition 1, 0 = partition 0); a
// net is stored as a same-length bit vector with a 1 for every cell it
// connects. The fitness of a chromosome is the number of nets that have cells
// in both partitions (lower is better).
//
// While FitnessEnb is high the block walks chromosome by chromosome
// (0..PopSiz), net by net (0..NetNum), word by word (0..CMLength), reading one
// chromosome word and the matching netlist word per clock. For each word pair
// it forms OR(chrom AND net) (net touches partition 1) and OR(~chrom AND net)
// (net touches partition 0) and ORs them into two sticky flags. When both
// flags are set the net is cut: the accumulator is incremented and the rest of
// that net is skipped, the next read already being the next net's first word.
// After the last net the accumulator is written to the fitness memory at
// {HighBank, chromosome}. The smallest fitness and its chromosome index are
// kept on BestFitness/BestAddr for the main controller (elitism).
// FitnessDone is high for one clock at the end; the block then waits for
// FitnessEnb to fall.
//
// The AND/OR cut detection with latched partition flags, the early exit on a
// cut, the word/net/population counters and the interface follow the
// published description. Own choices: the best-individual tracking is brought
// out as ports instead of being stored in the fitness memory, and the
// accumulator saturates at 2**FMDataWidth-1.
//
// Timing: both memories have one cycle of read latency and the block issues
// one read per clock without bubbles, so a chromosome costs the sum over nets
// of the words read up to the first cut (or all CMLength+1 words), plus one
// start clock per operation and one done clock.
//
// The top address bit of both the chromosome read and the fitness write is
// HighBank itself: the block always works on the parent half.
module fitness #(
  parameter int FMAddrWidth   = 9,
  parameter int FMDataWidth   = 8,
  parameter int CMDataWidth   = 8,
  parameter int CMField       = 8,
  parameter int MaxNetNumBits = 8
) (
  input  logic                             Clk,
  input  logic                             ResetN,
  input  logic [MaxNetNumBits-1:0]         NetNum,
  input  logic [7:0]                       PopSiz,
  input  logic [CMField-1:0]               CMLength,
  input  logic                             FitnessEnb,
  output logic                             FitnessDone,
  input  logic                             HighBank,
  output logic [FMAddrWidth+CMField-1:0]   CMAddrRd,
  input  logic [CMDataWidth-1:0]           CMDataRd,
  output logic                             CMRdEnb,
  output logic [MaxNetNumBits+CMField-1:0] NMAddr,
  input  logic [CMDataWidth-1:0]           NMDataRd,
  output logic                             NMRdEnb,
  output logic [FMAddrWidth-1:0]           FMAddr,
  output logic [FMDataWidth-1:0]           FMDataWr,
  output logic                             FMWrEnb,
  output logic [FMAddrWidth-2:0]           BestAddr,
  output logic [FMDataWidth-1:0]           BestFitness
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_RUN, S_DONE, S_WAIT} state_e;
  state_e state;

  logic [FMAddrWidth-2:0]   pc;        // chromosome counter
  logic [MaxNetNumBits-1:0] nc;        // net counter
  logic [CMField-1:0]       wc;        // word counter of the word in flight
  logic                     in1, in0;  // net seen in partition 1 / 0
  logic [FMDataWidth-1:0]   acc;

  logic                     in1_n, in0_n, cut, net_done, last_net, last_chr;
  logic [FMDataWidth-1:0]   acc_n;
  logic                     issue;
  logic [FMAddrWidth-2:0]   pc_i;
  logic [MaxNetNumBits-1:0] nc_i;
  logic [CMField-1:0]       wc_i;

  assign in1_n    = in1 | (|(CMDataRd & NMDataRd));
  assign in0_n    = in0 | (|(~CMDataRd & NMDataRd));
  assign cut      = in1_n & in0_n;
  assign net_done = cut || (wc == CMLength);
  assign last_net = (nc == NetNum);
  assign last_chr = ((FMAddrWidth-1)'(pc) == (FMAddrWidth-1)'(PopSiz));
  assign acc_n    = (cut && acc != '1) ? acc + 1'b1 : acc;

  // Next read: continue the net, start the next net, or the next chromosome.
  always_comb begin
    issue = 1'b0;
    pc_i  = pc;
    nc_i  = nc;
    wc_i  = wc + 1'b1;
    if (state == S_START) begin
      issue = 1'b1;
      pc_i  = '0;
      nc_i  = '0;
      wc_i  = '0;
    end else if (state == S_RUN) begin
      if (!net_done) begin
        issue = 1'b1;
      end else if (!last_net) begin
        issue = 1'b1;
        nc_i  = nc + 1'b1;
        wc_i  = '0;
      end else if (!last_chr) begin
        issue = 1'b1;
        pc_i  = pc + 1'b1;
        nc_i  = '0;
        wc_i  = '0;
      end
    end
  end

  assign CMRdEnb     = issue;
  assign NMRdEnb     = issue;
  assign CMAddrRd    = {HighBank, pc_i, wc_i};
  assign NMAddr      = {nc_i, wc_i};
  assign FMWrEnb     = (state == S_RUN) && net_done && last_net;
  assign FMAddr      = {HighBank, pc};
  assign FMDataWr    = acc_n;
  assign FitnessDone = (state == S_DONE);

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN) begin
      state       <= S_IDLE;
      pc          <= '0;
      nc          <= '0;
      wc          <= '0;
      in1         <= 1'b0;
      in0         <= 1'b0;
      acc         <= '0;
      BestAddr    <= '0;
      BestFitness <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (FitnessEnb) state <= S_START;
        S_START: begin
          pc    <= '0;
          nc    <= '0;
          wc    <= '0;
          in1   <= 1'b0;
          in0   <= 1'b0;
          acc   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          pc <= pc_i;
          nc <= nc_i;
          wc <= wc_i;
          if (!net_done) begin
            in1 <= in1_n;
            in0 <= in0_n;
          end else begin
            in1 <= 1'b0;
            in0 <= 1'b0;
            if (!last_net) begin
              acc <= acc_n;
            end else begin
              acc <= '0;
              if (pc == '0 || acc_n < BestFitness) begin
                BestFitness <= acc_n;
                BestAddr    <= pc;
              end
              if (last_chr) state <= S_DONE;
            end
          end
        end
        S_DONE: state <= S_WAIT;
        S_WAIT: if (!FitnessEnb) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
