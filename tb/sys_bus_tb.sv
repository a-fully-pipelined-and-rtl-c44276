// sys_bus_tb: self-checking testbench of the system bus.
// Four requesters (the default of sixteen is exercised by the top-level test) issue
// random reads and writes, each holding its request until accepted, toward the DRAM
// model with random stalls. Checks: every read returns the memory word to the cluster
// that asked, with its own channel bits, in request order; every write lands; the tag
// seen by memory names the cluster; under full load no requester waits more than
// NCL accepted-capable cycles (round robin); stalls of the memory port were exercised.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module sys_bus_tb;
  import fpca_pkg::*;

  localparam int NCL = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic [NCL-1:0] cl_req_valid, cl_req_ready, cl_rsp_valid;
  mem_req_t [NCL-1:0] cl_req;
  mem_rsp_t [NCL-1:0] cl_rsp;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid;
  mem_req_t dram_req;
  mem_rsp_t dram_rsp;

  sys_bus #(.NCL(NCL)) dut (.clk, .rst_n, .cl_req_valid, .cl_req, .cl_req_ready,
    .cl_rsp_valid, .cl_rsp, .dram_req_valid, .dram_req, .dram_req_ready,
    .dram_rsp_valid, .dram_rsp);
  dram_model #(.LATENCY(4), .STALL_PCT(20)) u_dram (.clk, .req_valid(dram_req_valid),
    .req(dram_req), .req_ready(dram_req_ready), .rsp_valid(dram_rsp_valid), .rsp(dram_rsp));

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

  typedef struct { logic [31:0] data; logic [1:0] ch; } exp_t;
  exp_t expq [NCL][$];
  int wait_cyc [NCL], max_wait = 0, grants_seen [NCL];
  logic [31:0] shadow [logic [31:0]];

  function automatic logic [31:0] mem_val(logic [31:0] a);
    return shadow.exists(a) ? shadow[a] : u_dram.init_val(a);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (dram_req_valid && dram_req_ready)
        check(int'(dram_req.tag[TAG_W-1:CH_W]) < NCL, "tag names a cluster");
      for (int i = 0; i < NCL; i++) begin
        if (cl_rsp_valid[i]) begin
          if (expq[i].size() == 0) check(0, "unexpected response");
          else begin
            exp_t e;
            e = expq[i].pop_front();
            check(cl_rsp[i].rdata == e.data && cl_rsp[i].tag[CH_W-1:0] == e.ch,
                  $sformatf("read data of cluster %0d", i));
          end
        end
        if (cl_req_valid[i] && cl_req_ready[i]) begin
          grants_seen[i]++;
          if (cl_req[i].we) shadow[cl_req[i].addr] = cl_req[i].wdata;
          else expq[i].push_back('{mem_val(cl_req[i].addr), cl_req[i].tag[1:0]});
        end
      end
    end
  end

  // requesters: hold a request until accepted, then maybe issue another
  logic [NCL-1:0] accepted;
  always @(posedge clk) accepted <= cl_req_valid & cl_req_ready;
  int phase_full = 1;
  initial begin
    rst_n = 1'b0; cl_req_valid = '0; cl_req = '0;
    #22 rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (cyc == 10000) phase_full = 0;
      for (int i = 0; i < NCL; i++) begin
        if (!cl_req_valid[i] || accepted[i]) begin
          if (phase_full || $urandom_range(2, 0) == 0) begin
            cl_req_valid[i] = 1'b1;
            cl_req[i].we    = 1'($urandom());
            cl_req[i].addr  = 32'($urandom_range(255, 0));
            cl_req[i].wdata = $urandom();
            cl_req[i].tag   = TAG_W'($urandom());
          end else cl_req_valid[i] = 1'b0;
          wait_cyc[i] = 0;
        end else if (cl_req_valid[i] && dram_req_ready) begin
          wait_cyc[i]++;
          if (wait_cyc[i] > max_wait) max_wait = wait_cyc[i];
        end
      end
    end
    cl_req_valid = '0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < NCL; i++) check(expq[i].size() == 0 && grants_seen[i] > 1000, "all answered, all served");
    foreach (shadow[a]) check(u_dram.peek(a) == shadow[a], "write landed");
    check(max_wait <= NCL, $sformatf("round-robin wait %0d", max_wait));
    check(u_dram.stalls > 0, "memory stalls");
    $display("max wait %0d, memory stalls %0d", max_wait, u_dram.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
