// fpca_top_tb: end-to-end, full-size test of the FPCA (4x4 clusters, 4096-word blocks,
// every parameter at its default).
//
// A host program composes GRADIENT accelerators through the GAM and runs them side by
// side on one 256-wide image stored as 64x64 blocks: accelerator A with one copy,
// B with two, C with four, and, once A has finished and freed its cluster, D with two
// copies (which must reuse freed clusters). Each allocation is configured by one
// broadcast of the configuration words, then given a task. Address translation goes
// through the IOMMU and the operating-system model, memory through dram_model with
// random stalls. Every interior result of every block is checked against the kernel
// computed from memory.
//
// Mechanism counters (the test fails if any stays at zero): TLB misses, TLB hits,
// memory stalls, system-bus back-pressure (a cluster's request held waiting), LMU
// full stalls, double buffering (GDTU moving a block in or out of an LMU while that
// LMU computes), IOMMU requests waiting behind others, duplication (several clusters
// of one accelerator computing at the same time), concurrent accelerators, reuse of
// a freed cluster, and DFG-iteration starts (one per block).
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module fpca_top_tb;
  import fpca_pkg::*;
  import gradient_map_pkg::*;

  localparam int NCL = 16, SIDE = 64, BW = SIDE * SIDE, NACC = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic host_alloc_valid, host_alloc_ready, host_alloc_done, host_cfg_we;
  logic [$clog2(NCL+1)-1:0] host_alloc_copies;
  logic [NCL-1:0] host_alloc_mask, host_busy_mask;
  logic [CFG_AW-1:0] host_cfg_addr;
  logic [31:0] host_cfg_wdata, tlb_hits, tlb_misses;
  logic host_launch_valid, host_launch_ready;
  task_t host_launch_task;
  logic [1:0] host_launch_id;
  logic [3:0] host_task_done;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  mem_req_t dram_req;
  mem_rsp_t dram_rsp;
  logic os_miss_valid, os_fill_valid;
  logic [VA_W-PAGE_LOG2-1:0] os_miss_vpn, os_fill_ppn;
  logic [NCL-1:0][NUM_THR-1:0] blk_start;
  logic [NCL-1:0][NUM_LMU-1:0] lmu_full;

  fpca_top dut (.clk, .rst_n, .host_alloc_valid, .host_alloc_copies, .host_alloc_ready,
    .host_alloc_done, .host_alloc_mask, .host_cfg_we, .host_cfg_addr, .host_cfg_wdata,
    .host_launch_valid, .host_launch_task, .host_launch_ready, .host_launch_id,
    .host_task_done, .host_busy_mask, .dram_req_valid, .dram_req, .dram_req_ready,
    .dram_rsp_valid, .dram_rsp, .os_miss_valid, .os_miss_vpn, .os_fill_valid, .os_fill_ppn,
    .blk_start, .lmu_full, .tlb_hits, .tlb_misses);

  dram_model #(.LATENCY(8), .STALL_PCT(10)) u_dram (.clk, .req_valid(dram_req_valid),
    .req(dram_req), .req_ready(dram_req_ready), .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));
  os_model #(.DELAY(20)) u_os (.clk, .miss_valid(os_miss_valid), .miss_vpn(os_miss_vpn),
    .fill_valid(os_fill_valid), .fill_ppn(os_fill_ppn));

  initial begin
    #100000000;
    $display("watchdog expired");
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

  function automatic logic [31:0] pa_of(logic [31:0] va);
    return {u_os.ppn_of(va[31:PAGE_LOG2]), va[PAGE_LOG2-1:0]};
  endfunction

  // ---------------- mechanism counters
  int n_overlap_in = 0, n_overlap_out = 0, n_full = 0, n_bus_wait = 0, n_iommu_wait = 0;
  int n_starts = 0, max_busy = 0, max_dup = 0;
  logic [NCL-1:0] computing;
  logic [NCL-1:0] acc_mask [NACC];
  for (genvar i = 0; i < NCL; i++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_cl[i].u_cluster.g_we[0] && dut.g_cl[i].u_cluster.l_busy[0]) n_overlap_in++;
      if (dut.g_cl[i].u_cluster.g_re[5] && dut.g_cl[i].u_cluster.l_busy[5]) n_overlap_out++;
      if (lmu_full[i] != '0) n_full++;
      if (dut.m_req_valid[i] && !dut.m_req_ready[i]) n_bus_wait++;
      if (dut.x_req_valid[i] && !dut.x_req_ready[i]) n_iommu_wait++;
      if (blk_start[i][0]) n_starts++;
    end
    assign computing[i] = dut.g_cl[i].u_cluster.l_busy[2];
  end
  always @(posedge clk) if (rst_n) begin
    if ($countones(host_busy_mask) > max_busy) max_busy = $countones(host_busy_mask);
    for (int a = 0; a < NACC; a++)
      if ($countones(computing & acc_mask[a]) > max_dup) max_dup = $countones(computing & acc_mask[a]);
  end

  // ---------------- host program
  int slot_done [4] = '{0, 0, 0, 0};
  always @(posedge clk) for (int s = 0; s < 4; s++) if (rst_n && host_task_done[s]) slot_done[s]++;

  int copies [NACC] = '{1, 2, 4, 2};
  int nsub   [NACC] = '{2, 2, 4, 2};
  int first  [NACC] = '{0, 2, 4, 8};   // blocks of one image, split among accelerators
  int slot   [NACC];
  logic [31:0] in_base = 32'h0020_0000 + 32'd300, out_base = 32'h0300_0000 + 32'd77;
  cluster_cfg_t g;

  task automatic compose_and_launch(int a);
    task_t t;
    logic [NCL-1:0] busy_before;
    while (!host_alloc_ready) @(negedge clk);
    busy_before = host_busy_mask;
    host_alloc_valid = 1'b1; host_alloc_copies = ($clog2(NCL+1))'(copies[a]);
    @(negedge clk);
    host_alloc_valid = 1'b0;
    check(host_alloc_done && $countones(host_alloc_mask) == copies[a], $sformatf("accelerator %0d allocated", a));
    acc_mask[a] = host_alloc_mask;
    check((acc_mask[a] & busy_before) == '0, "only idle clusters composed");
    for (int w = 0; w < int'(CFG_WORDS); w++) begin
      host_cfg_we = 1'b1; host_cfg_addr = CFG_AW'(w); host_cfg_wdata = cfg_word(g, w);
      @(negedge clk);
    end
    host_cfg_we = 1'b0;
    t = '0;
    t.first = SUB_W'(first[a]); t.count = SUB_W'(nsub[a]);
    t.base_va[0] = in_base; t.base_va[1] = out_base;
    while (!host_launch_ready) @(negedge clk);
    slot[a] = int'(host_launch_id);
    host_launch_valid = 1'b1; host_launch_task = t;
    @(negedge clk);
    host_launch_valid = 1'b0;
    $display("[%0t] accelerator %0d: %0d copies on clusters %b, subtasks %0d..%0d, slot %0d",
             $time, a, copies[a], acc_mask[a], first[a], first[a] + nsub[a] - 1, slot[a]);
  endtask

  initial begin
    int cyc, total;
    rst_n = 1'b0; host_alloc_valid = 1'b0; host_alloc_copies = '0; host_cfg_we = 1'b0;
    host_cfg_addr = '0; host_cfg_wdata = '0; host_launch_valid = 1'b0; host_launch_task = '0;
    for (int a = 0; a < NACC; a++) acc_mask[a] = '0;
    g = gradient_cfg(SIDE);
    total = 0;
    for (int a = 0; a < NACC; a++) total += nsub[a];
    for (int s = 0; s < total; s++)
      for (int w = 0; w < BW; w++)
        u_dram.poke(pa_of(in_base + 32'(s * BW + w)), 32'($urandom_range(2000, 0)) - 32'd1000);
    #22 rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < 3; a++) compose_and_launch(a);
    // D waits for A to finish, then must reuse A's cluster
    cyc = 0;
    while (slot_done[slot[0]] == 0 && cyc < 300000) begin @(negedge clk); cyc++; end
    check(slot_done[slot[0]] == 1, "accelerator 0 finished");
    compose_and_launch(3);
    check((acc_mask[3] & acc_mask[0]) != '0, "freed cluster reused");
    while (host_busy_mask != '0 && cyc < 600000) begin @(negedge clk); cyc++; end
    repeat (3) @(negedge clk);
    check(host_busy_mask == '0, "all accelerators finished");
    for (int a = 1; a < NACC; a++) check(slot_done[slot[a]] >= 1, $sformatf("accelerator %0d reported done", a));
    // results
    for (int s = 0; s < total; s++) begin
      int bad;
      bad = 0;
      for (int j = 1; j < SIDE - 1; j++)
        for (int k = 1; k < SIDE - 1; k++) begin
          logic [31:0] ib, e, got;
          ib = in_base + 32'(s * BW);
          e = grad_point(u_dram.peek(pa_of(ib + 32'(j * SIDE + k))), u_dram.peek(pa_of(ib + 32'((j - 1) * SIDE + k))),
                         u_dram.peek(pa_of(ib + 32'(j * SIDE + k - 1))), u_dram.peek(pa_of(ib + 32'((j + 1) * SIDE + k))),
                         u_dram.peek(pa_of(ib + 32'(j * SIDE + k + 1))));
          got = u_dram.peek(pa_of(out_base + 32'(s * BW + j * SIDE + k)));
          checks++;
          if (got != e) bad++;
        end
      if (bad != 0) begin
        failures += bad;
        $display("FAIL: block %0d has %0d wrong results", s, bad);
      end
    end
    $display("cycles %0d, blocks %0d", $time / 10, total);
    $display("mechanisms: tlb_miss %0d tlb_hit %0d mem_stall %0d bus_backpressure %0d lmu_full %0d",
             tlb_misses, tlb_hits, u_dram.stalls, n_bus_wait, n_full);
    $display("            prefetch_overlap %0d writeback_overlap %0d iommu_wait %0d max_duplicates_computing %0d max_busy_clusters %0d block_starts %0d",
             n_overlap_in, n_overlap_out, n_iommu_wait, max_dup, max_busy, n_starts);
    check(tlb_misses > 0, "TLB misses happened");
    check(tlb_hits > 0, "TLB hits happened");
    check(u_dram.stalls > 0, "memory stalls happened");
    check(n_bus_wait > 0, "system-bus back-pressure happened");
    check(n_full > 0, "LMU full stalls happened");
    check(n_overlap_in > 0, "prefetch overlapped computation");
    check(n_overlap_out > 0, "write-back overlapped computation");
    check(n_iommu_wait > 0, "IOMMU requests queued");
    check(max_dup >= 2, "copies of one accelerator computed at the same time");
    check(max_busy == 7, $sformatf("seven clusters busy at once (%0d)", max_busy));
    check(n_starts == total, $sformatf("one start per block (%0d)", n_starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
