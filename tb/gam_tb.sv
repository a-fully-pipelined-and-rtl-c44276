// gam_tb: self-checking testbench of the global accelerator manager (16 clusters).
// Cluster controllers are modelled: each accepts a task after a random delay, runs
// for a time proportional to its subtask count and reports done. The test composes
// accelerators with 1, 2, 4 and 3 copies, some while others still run, and checks:
// the allocation picks only idle clusters and grants fewer when fewer are idle;
// configuration writes reach exactly the clusters of the allocation; a launched task
// is split into contiguous ranges that cover it exactly, with sizes differing by at
// most one; only allocated clusters receive work; busy_mask tracks the clusters; and
// task_done pulses once per launch, in the launch's slot, after the last cluster of
// that task has finished, while tasks of other accelerators keep running.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module gam_tb;
  import fpca_pkg::*;

  localparam int NCL = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic alloc_valid, alloc_ready, alloc_done, cfg_we, launch_valid, launch_ready;
  logic [3:0] task_done;
  logic [1:0] launch_id;
  logic [$clog2(NCL+1)-1:0] alloc_copies;
  logic [NCL-1:0] alloc_mask, busy_mask, cl_cmd_valid, cl_cmd_ready, cl_done, cl_cfg_we;
  logic [CFG_AW-1:0] cfg_addr, cl_cfg_addr;
  logic [31:0] cfg_wdata, cl_cfg_wdata;
  task_t launch_task, cl_cmd;

  gam #(.NCL(NCL)) dut (.clk, .rst_n, .alloc_valid, .alloc_copies, .alloc_ready, .alloc_done,
    .alloc_mask, .cfg_we, .cfg_addr, .cfg_wdata, .launch_valid, .launch_task, .launch_ready,
    .launch_id, .task_done, .busy_mask, .cl_cmd_valid, .cl_cmd, .cl_cmd_ready, .cl_done, .cl_cfg_we,
    .cl_cfg_addr, .cl_cfg_wdata);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // cluster models
  int remaining [NCL];
  logic [NCL-1:0] running;
  int got_first [NCL], got_count [NCL];
  logic [NCL-1:0] got_task, owner_cfg;
  int cfg_hits [NCL];
  always @(posedge clk) begin
    if (!rst_n) begin
      running <= '0; cl_done <= '0; cl_cmd_ready <= '0; got_task <= '0;
      for (int i = 0; i < NCL; i++) cfg_hits[i] = 0;
    end else begin
      cl_done <= '0;
      for (int i = 0; i < NCL; i++) begin
        if (cl_cfg_we[i]) cfg_hits[i]++;
        if (cl_cmd_valid[i] && cl_cmd_ready[i]) begin
          check(!running[i], "task only to an idle cluster");
          check(busy_mask[i], "task only to an allocated cluster");
          running[i] <= 1'b1;
          got_task[i] <= 1'b1;
          got_first[i] = int'(cl_cmd.first); got_count[i] = int'(cl_cmd.count);
          remaining[i] = 30 * int'(cl_cmd.count) + int'($urandom_range(20, 1));
        end else if (running[i]) begin
          remaining[i]--;
          if (remaining[i] == 0) begin running[i] <= 1'b0; cl_done[i] <= 1'b1; end
        end
        cl_cmd_ready[i] <= !running[i] && ($urandom_range(2, 0) == 0);
      end
    end
  end

  int done_pulses = 0;
  int slot_of_launch [$];
  logic [NCL-1:0] slot_mask [4];
  int slot_pulses [4] = '{0, 0, 0, 0};
  always @(posedge clk)
    for (int s = 0; s < 4; s++)
      if (task_done[s]) begin
        done_pulses++;
        slot_pulses[s]++;
        check((running & slot_mask[s]) == '0, $sformatf("slot %0d done after its clusters", s));
      end

  task automatic allocate(int copies, int expect_n, output logic [NCL-1:0] m);
    logic [NCL-1:0] busy_before;
    while (!alloc_ready) @(negedge clk);
    busy_before = busy_mask;
    alloc_valid = 1'b1; alloc_copies = ($clog2(NCL+1))'(copies);
    @(negedge clk);
    alloc_valid = 1'b0;
    check(alloc_done, "alloc done");
    m = alloc_mask;
    check($countones(m) == expect_n, $sformatf("granted %0d of %0d", $countones(m), copies));
    check((m & busy_before) == '0, "only idle clusters allocated");
    check((busy_mask & m) == m, "allocated clusters marked busy");
    // configure: 20 words broadcast
    for (int i = 0; i < NCL; i++) cfg_hits[i] = 0;
    for (int w = 0; w < 20; w++) begin
      cfg_we = 1'b1; cfg_addr = CFG_AW'(w); cfg_wdata = $urandom();
      #1 check(cl_cfg_we == m && cl_cfg_addr == cfg_addr && cl_cfg_wdata == cfg_wdata, "config broadcast");
      @(negedge clk);
    end
    cfg_we = 1'b0;
    for (int i = 0; i < NCL; i++) check(cfg_hits[i] == (m[i] ? 20 : 0), "config reached exactly the set");
  endtask

  task automatic launch(logic [NCL-1:0] m, int first, int count);
    int cnt_before;
    task_t t;
    t = '0; t.first = SUB_W'(first); t.count = SUB_W'(count);
    for (int c = 0; c < int'(NUM_CH); c++) t.base_va[c] = $urandom();
    while (!launch_ready) @(negedge clk);
    got_task = got_task & ~m;
    slot_of_launch.push_back(int'(launch_id));
    slot_mask[launch_id] = m;
    launch_valid = 1'b1; launch_task = t;
    @(negedge clk);
    launch_valid = 1'b0;
    // hand-out finished: every allocated cluster has its range
    for (int c = 0; c < 2000 && (got_task & m) != m; c++) @(negedge clk);
    repeat (2) @(negedge clk);
    // coverage of the range
    begin
      int nxt, lo, hi, n;
      nxt = first; lo = count; hi = 0; n = $countones(m);
      for (int i = 0; i < NCL; i++)
        if (m[i]) begin
          check(got_task[i], "every allocated cluster got work");
          check(got_first[i] == nxt, $sformatf("contiguous ranges cl %0d", i));
          nxt += got_count[i];
          if (got_count[i] < lo) lo = got_count[i];
          if (got_count[i] > hi) hi = got_count[i];
        end
      if (m != '0) check(nxt == first + count, "ranges cover the task");
      check(hi - lo <= 1, "balanced split");
    end
  endtask

  initial begin
    logic [NCL-1:0] m1, m2, m4, m3, mx;
    int pulses;
    rst_n = 1'b0; alloc_valid = 1'b0; alloc_copies = '0; cfg_we = 1'b0; cfg_addr = '0;
    cfg_wdata = '0; launch_valid = 1'b0; launch_task = '0;
    #22 rst_n = 1'b1;
    @(negedge clk);
    allocate(1, 1, m1);  launch(m1, 0, 50);
    allocate(2, 2, m2);  launch(m2, 100, 77);
    allocate(4, 4, m4);  launch(m4, 1000, 4097);
    check((m1 & m2) == '0 && (m1 & m4) == '0 && (m2 & m4) == '0, "disjoint accelerators");
    allocate(12, 9, m3); launch(m3, 7, 9 * 100 + 5);
    allocate(3, 0, mx);                        // nothing idle
    while (!launch_ready) @(negedge clk);
    repeat (2) @(negedge clk);                 // let the freeing pulse be counted
    pulses = slot_pulses[launch_id];
    launch(mx, 0, 10);                         // empty launch completes at once
    repeat (4) @(negedge clk);
    check(slot_pulses[slot_of_launch[$]] == pulses + 1, "empty launch reports done");
    // wait for everything to drain
    while (busy_mask != '0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(done_pulses == 5, $sformatf("one task_done per launch (%0d)", done_pulses));
    allocate(3, 3, m3); launch(m3, 5, 2);      // fewer subtasks than copies
    while (busy_mask != '0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(done_pulses == 6, "task_done after small task");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
