// gdtu_tb: self-checking testbench of the global data transfer unit (and its DMACs).
// Channel 0 prefetches 64-word blocks into LMUs 0 and 1 (broadcast), channel 1 writes
// 64-word blocks back from LMU 2; channels 2 and 3 are off. The task covers subtasks
// 3..7 with array starts that are not page aligned, so blocks are cut into several
// segments. The testbench models the IOMMU (fixed offset translation, random answer
// delay), the DRAM (dram_model, random stalls) and the LMUs' token units and banks,
// with a random consumer/producer on the computation side. It checks every prefetched
// block word against memory, every written-back word in memory, the broadcast, that
// no other LMU is touched, that IOMMU requests in flight never exceed MAX_OUT but do
// exceed one, that full LMUs stalled the prefetch, and that done rises at the end.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module gdtu_tb;
  import fpca_pkg::*;

  localparam int BW = 64, NSUB = 5, FIRST = 3;
  localparam logic [31:0] OFF = 32'h0800_0000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  ch_cfg_t [NUM_CH-1:0] cfg;
  logic start, done;
  task_t tsk;
  logic xreq_valid, xreq_ready, xrsp_valid, xrsp_ready;
  xlat_req_t xreq;
  xlat_rsp_t xrsp;
  logic mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic [NUM_LMU-1:0] lmu_empty, lmu_full, lmu_we, lmu_commit, lmu_re, lmu_release;
  logic [NUM_LMU-1:0][AG_W-1:0] lmu_waddr, lmu_raddr;
  logic [NUM_LMU-1:0][DW-1:0] lmu_wdata, lmu_rdata;

  gdtu dut (.clk, .rst_n, .cfg, .start, .tsk, .done,
    .xreq_valid, .xreq, .xreq_ready, .xrsp_valid, .xrsp, .xrsp_ready,
    .mreq_valid, .mreq, .mreq_ready, .mrsp_valid, .mrsp,
    .lmu_empty, .lmu_full, .lmu_we, .lmu_waddr, .lmu_wdata, .lmu_commit,
    .lmu_re, .lmu_raddr, .lmu_rdata, .lmu_release);

  dram_model #(.LATENCY(5), .STALL_PCT(15)) u_dram (.clk, .req_valid(mreq_valid), .req(mreq),
    .req_ready(mreq_ready), .rsp_valid(mrsp_valid), .rsp(mrsp));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] wb_val(int b, int a);
    return 32'(b * 65536 + a * 3 + 11);
  endfunction

  // ---------------- IOMMU model
  xlat_req_t xq[$];
  int outst = 0, max_outst = 0, xdelay = 0;
  xlat_rsp_t cur;
  logic [31:0] cur_va;
  int cur_rem = 0;
  // handshakes are sampled at the rising edge, outputs change at the falling edge
  logic xq_fire, xr_fire;
  xlat_req_t xq_in;
  xlat_rsp_t xr_seen;
  initial begin
    xq_fire = 1'b0; xr_fire = 1'b0; xrsp_valid = 1'b0; xreq_ready = 1'b0; xrsp = '0;
  end
  always @(posedge clk) begin
    xq_fire = rst_n && xreq_valid && xreq_ready; xq_in = xreq;
    xr_fire = rst_n && xrsp_valid && xrsp_ready; xr_seen = xrsp;
  end
  always @(negedge clk) begin
    if (xq_fire) begin
      xq.push_back(xq_in);
      outst++;
      if (outst > max_outst) max_outst = outst;
    end
    if (xr_fire) begin
      if (xr_seen.last) outst--;
      cur_va += 32'(xr_seen.len); cur_rem -= int'(xr_seen.len);
    end
    xreq_ready = ($urandom_range(3, 0) != 0);
    if (cur_rem == 0 && xq.size() > 0 && xdelay == 0) begin
      xlat_req_t r;
      r = xq.pop_front();
      cur.tag = r.tag; cur_va = r.va; cur_rem = int'(r.len);
      xdelay = $urandom_range(40, 5);
    end
    if (xdelay > 0) xdelay--;
    xrsp_valid = 1'b0;
    if (cur_rem > 0 && xdelay == 0) begin
      int l;
      l = 1024 - int'(cur_va % 1024);
      if (l > cur_rem) l = cur_rem;
      xrsp.tag = cur.tag; xrsp.pa = cur_va + OFF; xrsp.len = AG_W'(l); xrsp.last = (l == cur_rem);
      xrsp_valid = 1'b1;
    end
  end

  // ---------------- LMU models
  logic [31:0] bank [3][2][BW];
  int cnt [3], ws [3], rs [3], blk_in = 0, blk_out_prod = 0, blk_out_done = 0, full_stalls = 0;
  int consumed = 0;
  always_comb
    for (int l = 0; l < NUM_LMU; l++) begin
      lmu_empty[l] = (l < 3) ? (cnt[l] == 0) : 1'b1;
      lmu_full[l]  = (l < 3) ? (cnt[l] == 2) : 1'b0;
    end

  always @(posedge clk) begin
    if (!rst_n) begin
      cnt = '{0, 0, 0}; ws = '{0, 0, 0}; rs = '{0, 0, 0};
    end else begin
      for (int l = 3; l < NUM_LMU; l++)
        if (lmu_we[l] || lmu_commit[l] || lmu_re[l] || lmu_release[l]) check(0, "unused LMU touched");
      if (lmu_we[0] != lmu_we[1] || lmu_commit[0] != lmu_commit[1] ||
          (lmu_we[0] && (lmu_waddr[0] != lmu_waddr[1] || lmu_wdata[0] != lmu_wdata[1])))
        check(0, "broadcast differs between LMU 0 and 1");
      if (lmu_full[0] && !done) full_stalls++;
      for (int l = 0; l < 2; l++) if (lmu_we[l]) bank[l][ws[l]][lmu_waddr[l]] = lmu_wdata[l];
      if (lmu_commit[0]) begin
        logic [31:0] va;
        va = tsk.base_va[0] + 32'((FIRST + blk_in) * BW);
        for (int a = 0; a < BW; a++)
          check(bank[0][ws[0]][a] == u_dram.peek(va + OFF + 32'(a)), $sformatf("prefetch blk %0d word %0d", blk_in, a));
        blk_in++;
        for (int l = 0; l < 2; l++) begin cnt[l]++; ws[l] ^= 1; end
      end
      // computation side consumes input blocks slowly, so the input LMUs fill up
      if (cnt[0] > 0 && $urandom_range(199, 0) == 0) begin
        for (int l = 0; l < 2; l++) begin cnt[l]--; rs[l] ^= 1; end
        consumed++;
      end
      // write-back LMU 2
      lmu_rdata[2] <= bank[2][rs[2]][lmu_raddr[2]];
      if (lmu_release[2]) begin
        logic [31:0] va;
        va = tsk.base_va[1] + 32'((FIRST + blk_out_done) * BW);
        for (int a = 0; a < BW; a++)
          check(u_dram.peek(va + OFF + 32'(a)) == wb_val(blk_out_done, a), $sformatf("write-back blk %0d word %0d", blk_out_done, a));
        blk_out_done++;
        cnt[2]--; rs[2] ^= 1;
      end
      if (cnt[2] < 2 && blk_out_prod < NSUB && $urandom_range(49, 0) == 0) begin
        for (int a = 0; a < BW; a++) bank[2][ws[2]][a] = wb_val(blk_out_prod, a);
        blk_out_prod++;
        cnt[2]++; ws[2] ^= 1;
      end
    end
  end

  initial begin
    int cyc;
    rst_n = 1'b0; start = 1'b0; cfg = '0; tsk = '0;
    cfg[0].enable = 1'b1; cfg[0].to_dram = 1'b0; cfg[0].lmu_mask = 6'b000011;
    cfg[0].block_words = AG_W'(BW); cfg[0].va_stride = 32'(BW);
    cfg[1].enable = 1'b1; cfg[1].to_dram = 1'b1; cfg[1].lmu_mask = 6'b000100;
    cfg[1].block_words = AG_W'(BW); cfg[1].va_stride = 32'(BW);
    tsk.first = SUB_W'(FIRST); tsk.count = SUB_W'(NSUB);
    tsk.base_va[0] = 32'h1000_0000 + 32'd1000;
    tsk.base_va[1] = 32'h2000_0000 + 32'd500;
    #22 rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 0;
    while (!done && cyc < 200000) begin @(negedge clk); cyc++; end
    check(done, "done");
    check(blk_in == NSUB && blk_out_done == NSUB, $sformatf("blocks in %0d out %0d", blk_in, blk_out_done));
    check(max_outst >= 2 && max_outst <= 4, $sformatf("requests in flight %0d", max_outst));
    check(full_stalls > 0, "prefetch stalled on full LMUs");
    check(u_dram.stalls > 0, "memory stalls seen");
    $display("cycles %0d, in flight max %0d, full-LMU stall cycles %0d, memory stalls %0d", cyc, max_outst, full_stalls, u_dram.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
