// cluster_ctrl_tb: self-checking testbench of the PE-cluster controller.
// Checks that GAM configuration writes reach the configuration unit one cycle later
// unchanged; then runs a series of tasks: the task is accepted only while idle, the
// GDTU receives it with a one-cycle start pulse, the synchronization unit is enabled
// for the whole run, DFG-iteration starts of both threads are counted, busy time is
// counted, and a one-cycle done pulse follows the GDTU's completion, after which the
// next task is accepted. Tasks offered while busy must wait.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module cluster_ctrl_tb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, done;
  task_t cmd, gdtu_task;
  logic gam_cfg_we, cfg_we;
  logic [CFG_AW-1:0] gam_cfg_addr, cfg_addr;
  logic [31:0] gam_cfg_wdata, cfg_wdata, blocks_computed, task_cycles;
  logic gdtu_start, gdtu_done;
  logic [NUM_THR-1:0] sync_run, thr_start;

  cluster_ctrl dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .done,
    .gam_cfg_we, .gam_cfg_addr, .gam_cfg_wdata, .cfg_we, .cfg_addr, .cfg_wdata,
    .gdtu_start, .gdtu_task, .gdtu_done, .sync_run, .thr_start, .blocks_computed, .task_cycles);

  initial begin
    #2000000;
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

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd = '0; gam_cfg_we = 1'b0; gam_cfg_addr = '0;
    gam_cfg_wdata = '0; gdtu_done = 1'b0; thr_start = '0;
    #12 rst_n = 1'b1;
    // configuration pass-through
    for (int i = 0; i < 200; i++) begin
      logic w; logic [CFG_AW-1:0] a; logic [31:0] d;
      @(negedge clk);
      w = 1'($urandom()); a = CFG_AW'($urandom()); d = $urandom();
      gam_cfg_we = w; gam_cfg_addr = a; gam_cfg_wdata = d;
      @(negedge clk);
      check(cfg_we == w && (!w || (cfg_addr == a && cfg_wdata == d)), "config pass-through");
      gam_cfg_we = 1'b0;
    end
    // tasks
    for (int t = 0; t < 40; t++) begin
      task_t tk;
      int run, starts, cyc;
      tk = '0;
      tk.first = SUB_W'($urandom()); tk.count = SUB_W'($urandom_range(100, 1));
      for (int c = 0; c < int'(NUM_CH); c++) tk.base_va[c] = $urandom();
      @(negedge clk);
      check(cmd_ready, "idle controller ready");
      cmd_valid = 1'b1; cmd = tk;
      @(negedge clk);
      cmd_valid = 1'b0; cmd = '0;
      check(gdtu_start && gdtu_task == tk && !cmd_ready, "GDTU started with the task");
      @(negedge clk);
      check(!gdtu_start, "start is a pulse");
      run = $urandom_range(60, 5); starts = 0; cyc = 0;
      for (int c = 0; c < run; c++) begin
        check(sync_run == '1 && !done, "running");
        thr_start = NUM_THR'($urandom());
        for (int k = 0; k < int'(NUM_THR); k++) starts += int'(thr_start[k]);
        // a competing task offered while busy must not be accepted
        cmd_valid = (c == 2); cmd = '1;
        if (c == run - 1) gdtu_done = 1'b1;
        @(negedge clk);
        cmd_valid = 1'b0; cmd = '0;
        cyc++;
        thr_start = '0;
      end
      gdtu_done = 1'b0;
      check(done && cmd_ready && sync_run == '0, "done pulse, idle again");
      check(int'(blocks_computed) == starts, $sformatf("blocks computed %0d vs %0d", blocks_computed, starts));
      check(int'(task_cycles) == cyc, $sformatf("task cycles %0d vs %0d", task_cycles, cyc));
      check(gdtu_task == tk, "competing task ignored");
      @(negedge clk);
      check(!done, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
