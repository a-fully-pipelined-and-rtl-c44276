// gdtu: global data transfer unit of a PE cluster
//
// Moves data blocks between the off-chip memory and the LMUs so that transfers of the
// next and previous blocks overlap computation on the current one. It is built of:
//   * a request initiator: for each subtask s of the task (first .. first+count-1) and
//     each enabled channel c it asks the IOMMU to translate the block at virtual
//     address base_va[c] + s * va_stride[c] of block_words[c] words. It keeps up to
//     MAX_OUT requests in flight and sends a new one as soon as one has been answered
//     completely, so page walks after a TLB miss hide behind hits;
//   * a monitor: takes the IOMMU's answers (contiguous physical segments) and sorts
//     them into a segment queue per channel. The IOMMU answers in request order, so a
//     full queue would block the answers of every channel behind it; the initiator
//     therefore reserves queue space before it sends a request (one entry per page the
//     block touches, known from the address and length) and gets the space back as
//     the DMAC consumes segments. A request waits while its channel lacks space;
//   * one DMAC per channel (dmac.sv) and the multiplexers joining channels to LMUs
//     (a channel serves the LMUs in its lmu_mask; the configuration must not give an
//     LMU to two channels) and to the single memory port (round robin, the channel
//     number travels as the request tag and routes the in-order responses back).
// `start` with `tsk` launches a task; `done` goes high once every channel has moved
// all its blocks and stays high until the next start. The word-level memory port,
// MAX_OUT and the queue depth are this design's choices.
module gdtu
  import fpca_pkg::*;
#(
  parameter int unsigned NCH     = NUM_CH,
  parameter int unsigned MAX_OUT = 4,
  parameter int unsigned SEGQ    = 8    // at least the pages one block can touch
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  ch_cfg_t [NCH-1:0]           cfg,
  input  logic                        start,
  input  task_t                       tsk,
  output logic                        done,
  // IOMMU
  output logic                        xreq_valid,
  output xlat_req_t                   xreq,
  input  logic                        xreq_ready,
  input  logic                        xrsp_valid,
  input  xlat_rsp_t                   xrsp,
  output logic                        xrsp_ready,
  // memory (system bus)
  output logic                        mreq_valid,
  output mem_req_t                    mreq,
  input  logic                        mreq_ready,
  input  logic                        mrsp_valid,
  input  mem_rsp_t                    mrsp,
  // LMUs
  input  logic [NUM_LMU-1:0]          lmu_empty,
  input  logic [NUM_LMU-1:0]          lmu_full,
  output logic [NUM_LMU-1:0]          lmu_we,
  output logic [NUM_LMU-1:0][AG_W-1:0] lmu_waddr,
  output logic [NUM_LMU-1:0][DW-1:0]  lmu_wdata,
  output logic [NUM_LMU-1:0]          lmu_commit,
  output logic [NUM_LMU-1:0]          lmu_re,
  output logic [NUM_LMU-1:0][AG_W-1:0] lmu_raddr,
  input  logic [NUM_LMU-1:0][DW-1:0]  lmu_rdata,
  output logic [NUM_LMU-1:0]          lmu_release
);

  // ------------------------------------------------------------ initiator
  logic              running;
  logic [SUB_W-1:0]  sub_idx;      // subtasks issued so far
  logic [CH_W-1:0]   ch_idx;
  logic [SUB_W-1:0]  sub_count;
  logic [NCH-1:0][VA_W-1:0] va_next;
  logic [$clog2(MAX_OUT+1)-1:0] outst;
  logic              gen_done, xreq_fire, xrsp_last;
  localparam int unsigned CRW = $clog2(SEGQ + 1);
  logic [NCH-1:0][CRW-1:0] credit;       // free segment-queue entries not yet reserved
  logic [NCH-1:0]          q_pop;
  logic [VA_W-1:0]         req_end;
  logic [CRW-1:0]          need;         // pages touched by the next request

  always_comb begin
    req_end = VA_W'(va_next[ch_idx][PAGE_LOG2-1:0]) + VA_W'(cfg[ch_idx].block_words) - 1'b1;
    need    = CRW'(req_end >> PAGE_LOG2) + 1'b1;
  end

  assign gen_done   = (sub_idx == sub_count);
  assign xreq_valid = running && !gen_done && cfg[ch_idx].enable && (int'(outst) < int'(MAX_OUT))
                      && (credit[ch_idx] >= need);
  assign xreq.tag   = TAG_W'(ch_idx);
  assign xreq.va    = va_next[ch_idx];
  assign xreq.len   = cfg[ch_idx].block_words;
  assign xreq_fire  = xreq_valid && xreq_ready;
  assign xrsp_last  = xrsp_valid && xrsp_ready && xrsp.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; sub_idx <= '0; ch_idx <= '0; sub_count <= '0;
      va_next <= '0; outst <= '0;
      for (int c = 0; c < int'(NCH); c++) credit[c] <= CRW'(SEGQ);
    end else begin
      for (int c = 0; c < int'(NCH); c++)
        credit[c] <= credit[c] + CRW'(q_pop[c])
                     - ((xreq_fire && int'(ch_idx) == c) ? need : CRW'(0));
      if (start) begin
        running   <= 1'b1;
        sub_idx   <= '0;
        ch_idx    <= '0;
        sub_count <= tsk.count;
        for (int c = 0; c < int'(NCH); c++)
          va_next[c] <= tsk.base_va[c] + VA_W'(tsk.first) * cfg[c].va_stride;
      end else if (running && !gen_done && (xreq_fire || !cfg[ch_idx].enable)) begin
        if (xreq_fire) va_next[ch_idx] <= va_next[ch_idx] + cfg[ch_idx].va_stride;
        if (int'(ch_idx) == int'(NCH) - 1) begin
          ch_idx  <= '0;
          sub_idx <= sub_idx + 1'b1;
        end else ch_idx <= ch_idx + 1'b1;
      end
      outst <= outst + xreq_fire - xrsp_last;
    end
  end

  // ------------------------------------------------------------ monitor
  logic [NCH-1:0]             q_full, q_empty;
  xlat_rsp_t [NCH-1:0]        q_head;

  assign xrsp_ready = !q_full[xrsp.tag[CH_W-1:0]];

  for (genvar c = 0; c < int'(NCH); c++) begin : g_q
    sfifo #(.W($bits(xlat_rsp_t)), .DEPTH(SEGQ)) u_q (
      .clk, .rst_n,
      .push(xrsp_valid && xrsp_ready && xrsp.tag[CH_W-1:0] == CH_W'(c)),
      .din(xrsp), .pop(q_pop[c]), .dout(q_head[c]),
      .empty(q_empty[c]), .full(q_full[c])
    );
  end

  // ------------------------------------------------------------ DMACs
  logic [NCH-1:0]                ch_done, m_valid, m_we, m_ready, ch_we, ch_commit, ch_re, ch_release;
  logic [NCH-1:0][VA_W-1:0]      m_addr;
  logic [NCH-1:0][DW-1:0]        m_wdata, ch_wdata, ch_rdata;
  logic [NCH-1:0][AG_W-1:0]      ch_waddr, ch_raddr;
  logic [NCH-1:0][SUB_W-1:0]     ch_blocks;
  logic [NCH-1:0][$bits(mem_req_t)-1:0] m_pkt;

  for (genvar c = 0; c < int'(NCH); c++) begin : g_ch
    dmac u_dmac (
      .clk, .rst_n, .cfg(cfg[c]), .start, .num_blocks(tsk.count),
      .done(ch_done[c]), .blocks_done(ch_blocks[c]),
      .seg_valid(!q_empty[c]), .seg(q_head[c]), .seg_pop(q_pop[c]),
      .mem_req_valid(m_valid[c]), .mem_req_we(m_we[c]), .mem_req_addr(m_addr[c]),
      .mem_req_wdata(m_wdata[c]), .mem_req_ready(m_ready[c]),
      .mem_rsp_valid(mrsp_valid && mrsp.tag[CH_W-1:0] == CH_W'(c)), .mem_rsp_data(mrsp.rdata),
      .lmu_empty, .lmu_full,
      .lm_we(ch_we[c]), .lm_waddr(ch_waddr[c]), .lm_wdata(ch_wdata[c]), .lm_commit(ch_commit[c]),
      .lm_re(ch_re[c]), .lm_raddr(ch_raddr[c]), .lm_rdata(ch_rdata[c]), .lm_release(ch_release[c])
    );
    assign m_pkt[c] = {m_we[c], m_addr[c], m_wdata[c], TAG_W'(c)};
  end

  logic [$bits(mem_req_t)-1:0] m_out;
  rr_arb_mux #(.N(NCH), .W($bits(mem_req_t))) u_marb (
    .clk, .rst_n, .in_valid(m_valid), .in_data(m_pkt), .in_ready(m_ready),
    .out_valid(mreq_valid), .out_data(m_out), .out_ready(mreq_ready)
  );
  assign mreq = mem_req_t'(m_out);

  // ------------------------------------------------------------ channel <-> LMU
  always_comb begin
    lmu_we = '0; lmu_waddr = '0; lmu_wdata = '0; lmu_commit = '0;
    lmu_re = '0; lmu_raddr = '0; lmu_release = '0;
    ch_rdata = '0;
    for (int c = 0; c < int'(NCH); c++) begin
      for (int l = int'(NUM_LMU) - 1; l >= 0; l--)
        if (cfg[c].lmu_mask[l]) ch_rdata[c] = lmu_rdata[l];
      for (int l = 0; l < int'(NUM_LMU); l++)
        if (cfg[c].enable && cfg[c].lmu_mask[l]) begin
          lmu_we[l]      |= ch_we[c];
          lmu_waddr[l]   |= ch_waddr[c];
          lmu_wdata[l]   |= ch_wdata[c];
          lmu_commit[l]  |= ch_commit[c];
          lmu_re[l]      |= ch_re[c];
          lmu_raddr[l]   |= ch_raddr[c];
          lmu_release[l] |= ch_release[c];
        end
    end
  end

  assign done = running && gen_done && (&ch_done);

endmodule
