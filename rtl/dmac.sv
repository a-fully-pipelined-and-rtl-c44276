// dmac: direct memory access controller of one GDTU channel
//
// Moves one whole data block per subtask between the off-chip memory and the LMUs the
// channel serves (cfg.lmu_mask; several LMUs receive the same words, a broadcast).
// Physical addresses come as contiguous segments from the IOMMU (already cut at page
// boundaries), through the channel's segment queue in the GDTU; the segments of one
// block arrive in order and the last one is flagged.
//
//   prefetch (cfg.to_dram = 0): wait until no served LMU is full, read the block word
//     by word from memory, write each returned word at the next offset of the LMUs'
//     free space, then commit the block to the LMUs' token units.
//   write-back (cfg.to_dram = 1): wait until the served LMU holds a finished block,
//     read it (one cycle LMU latency, a two-entry buffer keeps the stream at one word
//     per cycle), write it word by word to memory, then release the block.
//
// A full or empty LMU therefore stalls the channel, and a memory that withholds
// mem_req_ready stalls it too; either way the computation side waits on the LMU
// tokens. The memory port is one word per request, in-order responses routed to
// this channel by the GDTU (mem_rsp_valid is already filtered). Word-sized requests
// and the buffer depth are this design's choices. `done` is high once num_blocks
// blocks have been moved, until the next `start`.
module dmac
  import fpca_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  ch_cfg_t               cfg,
  input  logic                  start,
  input  logic [SUB_W-1:0]      num_blocks,
  output logic                  done,
  output logic [SUB_W-1:0]      blocks_done,
  // segment queue
  input  logic                  seg_valid,
  input  xlat_rsp_t             seg,
  output logic                  seg_pop,
  // memory
  output logic                  mem_req_valid,
  output logic                  mem_req_we,
  output logic [VA_W-1:0]       mem_req_addr,
  output logic [DW-1:0]         mem_req_wdata,
  input  logic                  mem_req_ready,
  input  logic                  mem_rsp_valid,
  input  logic [DW-1:0]         mem_rsp_data,
  // LMUs
  input  logic [NUM_LMU-1:0]    lmu_empty,
  input  logic [NUM_LMU-1:0]    lmu_full,
  output logic                  lm_we,
  output logic [AG_W-1:0]       lm_waddr,
  output logic [DW-1:0]         lm_wdata,
  output logic                  lm_commit,
  output logic                  lm_re,
  output logic [AG_W-1:0]       lm_raddr,
  input  logic [DW-1:0]         lm_rdata,
  output logic                  lm_release
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_XFER, S_DONE} state_e;
  state_e state;

  logic [SUB_W-1:0] nblk;
  logic             have_seg, seg_last, issued_all;
  logic [VA_W-1:0]  seg_pa;
  logic [AG_W-1:0]  seg_rem;
  logic [AG_W-1:0]  wcnt;      // words completed in this block
  logic [AG_W-1:0]  rd_off;    // write-back: next LMU offset to read
  logic             lmu_ok, block_end, take_word;

  // write-back buffer
  logic [1:0][VA_W-1:0] wb_addr;
  logic [1:0][DW-1:0]   wb_data;
  logic [1:0]           wb_cnt;
  logic                 wb_head;
  logic                 rd_infl;
  logic [VA_W-1:0]      rd_infl_addr;
  logic                 wb_pop;

  assign done = (state == S_DONE);
  assign lmu_ok = cfg.to_dram ? ((lmu_empty & cfg.lmu_mask) == '0)
                              : ((lmu_full  & cfg.lmu_mask) == '0);

  assign seg_pop = (state == S_XFER) && !have_seg && !issued_all && seg_valid;

  // one word of the current segment is taken this cycle
  always_comb begin
    take_word = 1'b0;
    lm_re     = 1'b0;
    wb_pop    = 1'b0;
    mem_req_valid = 1'b0;
    mem_req_we    = cfg.to_dram;
    mem_req_addr  = seg_pa;
    mem_req_wdata = wb_data[wb_head];
    if (state == S_XFER) begin
      if (!cfg.to_dram) begin
        mem_req_valid = have_seg;
        take_word     = have_seg && mem_req_ready;
      end else begin
        mem_req_valid = (wb_cnt != 2'd0);
        mem_req_addr  = wb_addr[wb_head];
        wb_pop        = mem_req_valid && mem_req_ready;
        // room for one more word once the buffer and the read in flight are counted
        take_word     = have_seg && (32'(wb_cnt) + 32'(rd_infl) - 32'(wb_pop) < 2);
        lm_re         = take_word;
      end
    end
  end
  assign lm_raddr = rd_off;

  // prefetch: returned words go straight into the LMUs
  assign lm_we    = (state == S_XFER) && !cfg.to_dram && mem_rsp_valid;
  assign lm_waddr = wcnt;
  assign lm_wdata = mem_rsp_data;

  assign block_end  = (state == S_XFER) && (wcnt == cfg.block_words - 1'b1) &&
                      (cfg.to_dram ? wb_pop : mem_rsp_valid);
  assign lm_commit  = block_end && !cfg.to_dram;
  assign lm_release = block_end &&  cfg.to_dram;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      nblk <= '0; blocks_done <= '0;
      have_seg <= 1'b0; seg_last <= 1'b0; issued_all <= 1'b0;
      seg_pa <= '0; seg_rem <= '0; wcnt <= '0; rd_off <= '0;
      wb_cnt <= '0; wb_head <= 1'b0; rd_infl <= 1'b0; rd_infl_addr <= '0;
      wb_addr <= '0; wb_data <= '0;
    end else begin
      if (start) begin
        nblk        <= num_blocks;
        blocks_done <= '0;
        state       <= (!cfg.enable || num_blocks == '0) ? S_DONE : S_WAIT;
      end else begin
        unique case (state)
          S_WAIT:
            if (lmu_ok) begin
              state <= S_XFER;
              have_seg <= 1'b0; issued_all <= 1'b0;
              wcnt <= '0; rd_off <= '0;
            end
          S_XFER: begin
            if (seg_pop) begin
              have_seg <= (seg.len != '0);
              seg_pa   <= seg.pa;
              seg_rem  <= seg.len;
              seg_last <= seg.last;
              if (seg.len == '0 && seg.last) issued_all <= 1'b1;
            end else if (take_word) begin
              seg_pa  <= seg_pa + 1'b1;
              seg_rem <= seg_rem - 1'b1;
              if (seg_rem == 1) begin
                have_seg <= 1'b0;
                if (seg_last) issued_all <= 1'b1;
              end
            end
            if (cfg.to_dram) begin
              // LMU read issued last cycle delivers its word now
              if (take_word) rd_off <= rd_off + 1'b1;
              rd_infl      <= take_word;
              rd_infl_addr <= seg_pa;
              if (rd_infl) begin
                wb_addr[wb_head ^ wb_cnt[0]] <= rd_infl_addr;
                wb_data[wb_head ^ wb_cnt[0]] <= lm_rdata;
              end
              if (wb_pop) wb_head <= ~wb_head;
              wb_cnt <= wb_cnt + {1'b0, rd_infl} - {1'b0, wb_pop};
              if (wb_pop) wcnt <= wcnt + 1'b1;
            end else if (mem_rsp_valid) begin
              wcnt <= wcnt + 1'b1;
            end
            if (block_end) begin
              blocks_done <= blocks_done + 1'b1;
              state <= (blocks_done + 1'b1 == nblk) ? S_DONE : S_WAIT;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
