// lmu: local memory unit, a double-buffered scratch-pad bank with its own addressing
//
// Every load and every store of the kernel's inner loop gets an LMU of its own, so no
// two accesses ever compete for a memory port. An LMU holds a dual-port memory bank of
// two block-sized spaces, an address generator (addr_gen) for the computation side,
// a token unit (token_unit, FIFO of two blocks) and the address offsets that select the
// space in use. Port multiplexers, set by cfg.is_output, give each memory port to
// either the computation or the GDTU (global data transfer unit):
//
//   input LMU  (is_output = 0): GDTU writes blocks, the address generator reads them
//                               and streams one word per cycle to the CEs.
//   output LMU (is_output = 1): the address generator writes results arriving from the
//                               CEs, the GDTU reads finished blocks for write-back.
//
// Execution: the synchronization unit pulses `start` when every LMU of the DFG is
// `ready`. The LMU then waits cfg.countdown cycles and walks its domain, one access per
// cycle, and at the last access commits (output) or frees (input) its block. For an
// output LMU the countdown is the DFG delay, computed at compile time; that input LMUs
// may count down too (to align operands that reach a CE without a register chain) is
// this design's generalisation.
//
// Timing, with start high in cycle 0 and countdown K: the address of point n is
// applied in cycle K+1+n. An input LMU drives point n's word on ce_out in cycle
// K+2+n (registered memory output); an output LMU stores ce_in of cycle K+1+n.
// The GDTU read port also has one cycle of latency (gd_rdata). GDTU addresses are
// offsets inside the current block. BLOCK_WORDS must be a power of two.
//
// The dual-port bank, the per-load address generator and the depth-2 block FIFO follow
// the FPCA architecture; latencies, the split of the bank into halves and input
// countdowns are this design's choices.
module lmu
  import fpca_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 4096
) (
  input  logic            clk,
  input  logic            rst_n,
  input  lmu_cfg_t        cfg,
  input  logic            start,
  // computation side (permutation network)
  input  logic [DW-1:0]   ce_in,
  output logic [DW-1:0]   ce_out,
  // GDTU side
  input  logic            gd_we,
  input  logic [AG_W-1:0] gd_waddr,
  input  logic [DW-1:0]   gd_wdata,
  input  logic            gd_commit,
  input  logic            gd_re,
  input  logic [AG_W-1:0] gd_raddr,
  output logic [DW-1:0]   gd_rdata,
  input  logic            gd_release,
  // status
  output logic            empty,
  output logic            full,
  output logic            busy,
  output logic            ready,
  output logic            done
);

  localparam int unsigned OW = $clog2(BLOCK_WORDS);

  typedef enum logic [1:0] {S_IDLE, S_COUNT, S_RUN} state_e;
  state_e state;

  logic [DW-1:0]   mem [2*BLOCK_WORDS];
  logic [DW-1:0]   rd_q;
  logic [CD_W-1:0] cd_cnt;
  logic [AG_W-1:0] ag_addr;
  logic            ag_last, run;
  logic            wr_slot, rd_slot;
  logic            produce, consume;

  // memory port selection
  logic            mem_we, mem_re;
  logic [OW:0]     mem_waddr, mem_raddr;
  logic [DW-1:0]   mem_wdata;

  assign run  = (state == S_RUN);
  assign done = run && ag_last;
  assign busy = (state != S_IDLE);

  addr_gen u_ag (
    .clk, .rst_n, .cfg(cfg.ag),
    .load(start && state == S_IDLE), .step(run),
    .addr(ag_addr), .last(ag_last)
  );

  token_unit #(.DEPTH(2)) u_tok (
    .clk, .rst_n, .produce, .consume,
    .wr_slot(wr_slot), .rd_slot(rd_slot), .empty, .full
  );

  always_comb begin
    if (cfg.is_output) begin
      mem_we    = run;
      mem_waddr = {wr_slot, ag_addr[OW-1:0]};
      mem_wdata = ce_in;
      mem_re    = gd_re;
      mem_raddr = {rd_slot, gd_raddr[OW-1:0]};
      produce   = done;
      consume   = gd_release;
    end else begin
      mem_we    = gd_we;
      mem_waddr = {wr_slot, gd_waddr[OW-1:0]};
      mem_wdata = gd_wdata;
      mem_re    = run;
      mem_raddr = {rd_slot, ag_addr[OW-1:0]};
      produce   = gd_commit;
      consume   = done;
    end
  end

  assign ready    = cfg.enable && !busy && (cfg.is_output ? !full : !empty);
  assign ce_out   = rd_q;
  assign gd_rdata = rd_q;

  // dual-port bank: one write port, one registered read port
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (mem_re) rd_q <= mem[mem_raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cd_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            if (cfg.countdown == '0) state <= S_RUN;
            else begin
              state  <= S_COUNT;
              cd_cnt <= cfg.countdown - 1'b1;
            end
          end
        S_COUNT:
          if (cd_cnt == '0) state <= S_RUN;
          else cd_cnt <= cd_cnt - 1'b1;
        S_RUN:
          if (ag_last) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);

endmodule
