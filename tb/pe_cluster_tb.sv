// pe_cluster_tb: end-to-end test of one PE cluster running the GRADIENT kernel.
// The cluster is configured through its controller with the hand-compiled mapping of
// gradient_map_pkg (64x64 blocks, the cluster's default block size) and given a task
// of four subtasks whose input array is not page aligned. The IOMMU is modelled by a
// fixed-offset translation that cuts requests at 1024-word pages, after a random
// delay; memory is dram_model with random stalls. Every interior result of every
// block is compared with the kernel computed from the memory contents. The test also
// checks that all blocks were started and that the double buffers really overlapped
// transfer with computation (GDTU writing an input LMU, or reading the output LMU,
// while that LMU computes), and checks the computation rate: while computing, one iteration per cycle.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module pe_cluster_tb;
  import fpca_pkg::*;
  import gradient_map_pkg::*;

  localparam int SIDE = 64, BW = SIDE * SIDE, NSUB = 4, FIRST = 2;
  localparam logic [31:0] OFF = 32'h0100_0000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, done, cfg_we;
  task_t cmd;
  logic [CFG_AW-1:0] cfg_addr;
  logic [31:0] cfg_wdata, blocks_computed, task_cycles;
  logic xreq_valid, xreq_ready, xrsp_valid, xrsp_ready;
  xlat_req_t xreq;
  xlat_rsp_t xrsp;
  logic mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq;
  mem_rsp_t mrsp;
  logic [NUM_THR-1:0] blk_start;
  logic [NUM_LMU-1:0] lmu_empty_o, lmu_full_o;

  pe_cluster dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .done, .cfg_we, .cfg_addr,
    .cfg_wdata, .xreq_valid, .xreq, .xreq_ready, .xrsp_valid, .xrsp, .xrsp_ready,
    .mreq_valid, .mreq, .mreq_ready, .mrsp_valid, .mrsp, .blk_start, .lmu_empty_o,
    .lmu_full_o, .blocks_computed, .task_cycles);

  dram_model #(.LATENCY(6), .STALL_PCT(10)) u_dram (.clk, .req_valid(mreq_valid), .req(mreq),
    .req_ready(mreq_ready), .rsp_valid(mrsp_valid), .rsp(mrsp));

  initial begin
    #50000000;
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

  // IOMMU model
  xlat_req_t xq[$];
  int xdelay = 0, cur_rem = 0;
  logic [TAG_W-1:0] cur_tag;
  logic [31:0] cur_va;
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
    if (xq_fire) xq.push_back(xq_in);
    if (xr_fire) begin
      cur_va += 32'(xr_seen.len); cur_rem -= int'(xr_seen.len);
    end
    xreq_ready = 1'b1;
    if (cur_rem == 0 && xq.size() > 0 && xdelay == 0) begin
      xlat_req_t r;
      r = xq.pop_front();
      cur_tag = r.tag; cur_va = r.va; cur_rem = int'(r.len);
      xdelay = $urandom_range(30, 3);
    end
    if (xdelay > 0) xdelay--;
    xrsp_valid = 1'b0;
    if (cur_rem > 0 && xdelay == 0) begin
      int l;
      l = 1024 - int'(cur_va % 1024);
      if (l > cur_rem) l = cur_rem;
      xrsp.tag = cur_tag; xrsp.pa = cur_va + OFF; xrsp.len = AG_W'(l); xrsp.last = (l == cur_rem);
      xrsp_valid = 1'b1;
    end
  end

  // mechanism counters
  int overlap_in = 0, overlap_out = 0, starts = 0, busy_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_we[0] && dut.l_busy[0]) overlap_in++;
    if (dut.g_re[5] && dut.l_busy[5]) overlap_out++;
    if (blk_start[0]) starts++;
    if (dut.l_busy[2]) busy_cycles++;
  end

  initial begin
    cluster_cfg_t g;
    task_t t;
    int cyc;
    rst_n = 1'b0; cmd_valid = 1'b0; cmd = '0; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    t = '0;
    t.first = SUB_W'(FIRST); t.count = SUB_W'(NSUB);
    t.base_va[0] = 32'h0010_0000 + 32'd300;
    t.base_va[1] = 32'h0040_0000 + 32'd1000;
    // input data: small values
    for (int s = FIRST; s < FIRST + NSUB; s++)
      for (int a = 0; a < BW; a++)
        u_dram.poke(t.base_va[0] + 32'(s * BW + a) + OFF, 32'($urandom_range(2000, 0)) - 32'd1000);
    #22 rst_n = 1'b1;
    g = gradient_cfg(SIDE);
    for (int w = 0; w < int'(CFG_WORDS); w++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = CFG_AW'(w); cfg_wdata = cfg_word(g, w);
    end
    @(negedge clk);
    cfg_we = 1'b0;
    repeat (2) @(negedge clk);
    check(dut.cfg == g, "configuration loaded");
    check(cmd_ready, "controller idle");
    cmd_valid = 1'b1; cmd = t;
    @(negedge clk);
    cmd_valid = 1'b0;
    cyc = 0;
    while (!done && cyc < 2000000) begin @(negedge clk); cyc++; end
    check(done, "task done");
    check(starts == NSUB && int'(blocks_computed) == NSUB, $sformatf("blocks started %0d", starts));
    // fully pipelined: one DFG iteration per cycle while computing (II = 1)
    check(busy_cycles <= NSUB * ((SIDE - 2) * (SIDE - 2) + 2), $sformatf("compute cycles %0d for %0d iterations", busy_cycles, NSUB * (SIDE - 2) * (SIDE - 2)));
    for (int s = FIRST; s < FIRST + NSUB; s++) begin
      logic [31:0] ib, ob;
      ib = t.base_va[0] + 32'(s * BW) + OFF;
      ob = t.base_va[1] + 32'(s * BW) + OFF;
      for (int j = 1; j < SIDE - 1; j++)
        for (int k = 1; k < SIDE - 1; k++) begin
          logic [31:0] e, got;
          e = grad_point(u_dram.peek(ib + 32'(j * SIDE + k)), u_dram.peek(ib + 32'((j - 1) * SIDE + k)),
                         u_dram.peek(ib + 32'(j * SIDE + k - 1)), u_dram.peek(ib + 32'((j + 1) * SIDE + k)),
                         u_dram.peek(ib + 32'(j * SIDE + k + 1)));
          got = u_dram.peek(ob + 32'(j * SIDE + k));
          check(got == e, $sformatf("block %0d y[%0d][%0d] got %0d want %0d", s, j, k, got, e));
        end
    end
    check(overlap_in > 0, "prefetch overlapped computation");
    check(overlap_out > 0, "write-back overlapped computation");
    $display("cycles %0d; compute-busy %0d; prefetch/compute overlap %0d; write-back/compute overlap %0d; memory stalls %0d",
             cyc, busy_cycles, overlap_in, overlap_out, u_dram.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
