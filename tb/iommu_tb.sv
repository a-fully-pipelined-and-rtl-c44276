// iommu_tb: self-checking testbench of the IOMMU with the OS model.
// Sends block translation requests (random addresses inside a small set of pages so
// that both TLB hits and misses occur, lengths from 1 word to four pages) with random
// back-pressure on the answers. For each request it checks that the segments come in
// order with the request's tag, start at the translated address of the next word,
// end at a page boundary or at the end of the block, cover the block exactly, and
// that only the final one is flagged last. It also checks that misses went to the OS
// and that the TLB then hit.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module iommu_tb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, rsp_valid, rsp_ready;
  xlat_req_t req;
  xlat_rsp_t rsp;
  logic os_miss_valid, os_fill_valid;
  logic [VA_W-PAGE_LOG2-1:0] os_miss_vpn, os_fill_ppn;
  logic [31:0] hits, misses;

  iommu #(.TLB_ENTRIES(4)) dut (.clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp, .rsp_ready,
              .os_miss_valid, .os_miss_vpn, .os_fill_valid, .os_fill_ppn, .hits, .misses);
  os_model #(.DELAY(5)) u_os (.clk, .miss_valid(os_miss_valid), .miss_vpn(os_miss_vpn),
                              .fill_valid(os_fill_valid), .fill_ppn(os_fill_ppn));

  xlat_req_t sent[$];

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

  // producer
  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      xlat_req_t r;
      r.tag = TAG_W'(n);
      r.va  = 32'h0010_0000 + 32'($urandom_range(7, 0)) * 1024 + 32'($urandom_range(1023, 0));
      r.len = AG_W'((n % 4 == 0) ? 4096 : $urandom_range(2000, 1));
      @(negedge clk);
      req_valid = 1'b1; req = r;
      do @(posedge clk); while (!req_ready);
      sent.push_back(r);
      @(negedge clk);
      req_valid = 1'b0;
    end
  end

  // consumer and checker
  initial begin
    int done_n;
    done_n = 0;
    rsp_ready = 1'b0;
    @(posedge rst_n);
    while (done_n < 200) begin
      xlat_req_t r;
      logic [31:0] va;
      int rem;
      wait (sent.size() > 0);
      r = sent.pop_front();
      va = r.va; rem = int'(r.len);
      forever begin
        int want_len;
        @(negedge clk);
        rsp_ready = ($urandom_range(3, 0) != 0);
        @(posedge clk);
        if (!(rsp_valid && rsp_ready)) continue;
        want_len = 1024 - int'(va % 1024);
        if (want_len > rem) want_len = rem;
        check(rsp.tag == r.tag, "tag");
        check(rsp.pa == {u_os.ppn_of(va[31:10]), va[9:0]}, $sformatf("pa %h for va %h", rsp.pa, va));
        check(int'(rsp.len) == want_len, $sformatf("len %0d want %0d", rsp.len, want_len));
        check(rsp.last == (want_len == rem), "last flag");
        va += 32'(want_len); rem -= want_len;
        if (rem == 0) break;
      end
      done_n++;
    end
    @(negedge clk);
    check(misses > 0 && u_os.served == misses, "misses served by the OS");
    check(hits > misses, "TLB hits after the pages were loaded");
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
