// ga_controller: runs one GA problem from data held in the board's SSRAM.
//
// While EnbGACtl is high the controller owns the SSRAM port. It reads the
// eight GA parameters from words RegBase..RegBase+7 (low byte of each word)
// and writes them into the processor's control registers through the CPU
// port, pulses StartGA, then reads (NetNum+1)*(CMLength+1) netlist words from
// NetBase upwards (low CMDataWidth bits of each word) and feeds them to the
// processor on NetlistIn/NetlistVld. When the processor streams out the final
// population, every PopOut word is written to the SSRAM from OutBase upwards,
// as {FitnessOut, PopOut} (fitness in bits 8+ of the word, chromosome word in
// the low bits). On GADone it pulses GACtlReset for one clock, which tells
// the bus-side register to clear EnbGACtl, and waits for EnbGACtl to fall
// before it can start again.
//
// SSRAM port: one access per clock, ZbtRd or ZbtWr with ZbtAddr (word
// address) and ZbtWrData; read data returns on ZbtRdData ZbtRdLatency clocks
// after the read (2 for a pipelined ZBT SRAM). Reads are issued back to back,
// so the netlist moves at one word per clock.
//
// The document gives this block's function (load parameters and netlist from
// the SSRAM, start the processor, store the results, then raise GACtlReset);
// the SSRAM layout, word formats and the order "parameters, StartGA, netlist"
// are this design's own.
//
// Many outputs are plain wires by design: CPUData and NetlistIn are the low
// bits of the SSRAM read data, ZbtWrData is {FitnessOut, PopOut} with zeros
// above, and CPUAddr[3] is always 0.
module ga_controller #(
  parameter int          CMDataWidth   = 8,
  parameter int          FMDataWidth   = 8,
  parameter int          CMField       = 8,
  parameter int          MaxNetNumBits = 8,
  parameter int          ZbtAddrWidth  = 18,
  parameter int          ZbtDataWidth  = 32,
  parameter int          ZbtRdLatency  = 2,
  parameter logic [17:0] RegBase       = 18'h0_0000,
  parameter logic [17:0] NetBase       = 18'h0_0100,
  parameter logic [17:0] OutBase       = 18'h2_0000
) (
  input  logic                    Clk,
  input  logic                    ResetN,
  // bus-side control
  input  logic                    EnbGACtl,
  output logic                    GACtlReset,
  // SSRAM port (through the multiplexer)
  output logic [ZbtAddrWidth-1:0] ZbtAddr,
  output logic [ZbtDataWidth-1:0] ZbtWrData,
  output logic                    ZbtWr,
  output logic                    ZbtRd,
  input  logic [ZbtDataWidth-1:0] ZbtRdData,
  // GA processor host side
  output logic                    CPUWr,
  output logic [3:0]              CPUAddr,
  output logic [7:0]              CPUData,
  output logic                    StartGA,
  output logic                    NetlistVld,
  output logic [CMDataWidth-1:0]  NetlistIn,
  input  logic [CMDataWidth-1:0]  PopOut,
  input  logic                    PopOutVld,
  input  logic [FMDataWidth-1:0]  FitnessOut,
  input  logic                    GADone
);

  typedef enum logic [2:0] {
    S_IDLE, S_REGS, S_START, S_NET, S_RUN, S_RESET, S_WAIT
  } state_e;
  state_e state;

  logic [3:0]              reg_cnt;       // parameter reads issued
  logic [16:0]             net_left;      // netlist reads still to issue
  logic [ZbtAddrWidth-1:0] rd_addr, wr_addr;
  logic [15:0]             cmlength_q, netnum_q;
  logic [ZbtRdLatency-1:0] rd_pipe;       // read issued n+1 clocks ago
  logic [3:0]              tag_pipe [ZbtRdLatency];
  logic                    rd_vld;
  logic [3:0]              rd_tag;

  // the read issued ZbtRdLatency clocks ago returns now
  assign rd_vld = rd_pipe[ZbtRdLatency-1];
  assign rd_tag = tag_pipe[ZbtRdLatency-1];

  // SSRAM accesses
  always_comb begin
    ZbtRd     = 1'b0;
    ZbtWr     = 1'b0;
    ZbtAddr   = rd_addr;
    ZbtWrData = ZbtDataWidth'({FitnessOut, PopOut});
    unique case (state)
      S_REGS:  ZbtRd = (reg_cnt != 4'd8);
      S_NET:   ZbtRd = (net_left != '0);
      S_RUN: begin
        ZbtWr   = PopOutVld;
        ZbtAddr = wr_addr;
      end
      default: ;
    endcase
  end

  // returned parameter words go straight to the control registers, returned
  // netlist words straight to the netlist input
  assign CPUWr      = rd_vld && rd_tag[3];
  assign CPUAddr    = {1'b0, rd_tag[2:0]};
  assign CPUData    = ZbtRdData[7:0];
  assign NetlistVld = rd_vld && !rd_tag[3];
  assign NetlistIn  = ZbtRdData[CMDataWidth-1:0];
  assign StartGA    = (state == S_START);
  assign GACtlReset = (state == S_RESET);

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN) begin
      rd_pipe <= '0;
      for (int i = 0; i < ZbtRdLatency; i++) tag_pipe[i] <= '0;
    end else begin
      rd_pipe     <= {rd_pipe[ZbtRdLatency-2:0], ZbtRd};
      tag_pipe[0] <= (state == S_REGS) ? {1'b1, reg_cnt[2:0]} : 4'b0000;
      for (int i = 1; i < ZbtRdLatency; i++) tag_pipe[i] <= tag_pipe[i-1];
    end
  end

  always_ff @(posedge Clk or negedge ResetN) begin
    if (!ResetN) begin
      state      <= S_IDLE;
      reg_cnt    <= '0;
      net_left   <= '0;
      rd_addr    <= '0;
      wr_addr    <= '0;
      cmlength_q <= '0;
      netnum_q   <= '0;
    end else begin
      // keep the chromosome length and net count as they are loaded
      if (CPUWr) begin
        unique case (CPUAddr[2:0])
          3'd0:    cmlength_q[7:0]  <= CPUData;
          3'd1:    cmlength_q[15:8] <= CPUData;
          3'd2:    netnum_q[7:0]    <= CPUData;
          3'd3:    netnum_q[15:8]   <= CPUData;
          default: ;
        endcase
      end
      unique case (state)
        S_IDLE: begin
          reg_cnt <= '0;
          rd_addr <= RegBase[ZbtAddrWidth-1:0];
          wr_addr <= OutBase[ZbtAddrWidth-1:0];
          if (EnbGACtl) state <= S_REGS;
        end
        S_REGS: begin
          if (reg_cnt != 4'd8) begin
            reg_cnt <= reg_cnt + 1'b1;
            rd_addr <= rd_addr + 1'b1;
          end else if (rd_pipe == '0) begin
            state <= S_START;      // all parameters written
          end
        end
        S_START: begin
          rd_addr  <= NetBase[ZbtAddrWidth-1:0];
          net_left <= 17'((32'(CMField'(cmlength_q)) + 1) *
                          (32'(MaxNetNumBits'(netnum_q)) + 1));
          state    <= S_NET;
        end
        S_NET: begin
          if (net_left != '0) begin
            net_left <= net_left - 1'b1;
            rd_addr  <= rd_addr + 1'b1;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (PopOutVld) wr_addr <= wr_addr + 1'b1;
          if (GADone) state <= S_RESET;
        end
        S_RESET: state <= S_WAIT;
        S_WAIT:  if (!EnbGACtl) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (ZbtRdLatency >= 2 && CMDataWidth + FMDataWidth <= ZbtDataWidth)
    else $error("ga_controller: unsupported SSRAM latency or word width");

endmodule
