// config_unit_tb: self-checking testbench of the configuration unit.
// Writes random 32-bit words to random addresses (including addresses past the last
// word, which must be ignored), keeps a reference copy of the configuration, and after
// every write compares the packed configuration output and the read-back port with
// it. Also checks that reset clears every bit.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module config_unit_tb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, we;
  logic [CFG_AW-1:0] addr;
  logic [31:0] wdata, rdata;
  cluster_cfg_t cfg;
  int checks = 0, failures = 0;

  config_unit dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .cfg);

  initial begin
    #1000000;
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

  logic [CFG_WORDS*32-1:0] ref_bits;

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; wdata = '0; ref_bits = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(cfg == '0, "reset clears configuration");
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom_range((1 << CFG_AW) - 1, 0);
      addr = CFG_AW'(a); wdata = $urandom(); we = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (we && a < int'(CFG_WORDS)) ref_bits[a*32 +: 32] = wdata;
      @(negedge clk);
      we = 1'b0;
      check(cfg == cluster_cfg_t'(ref_bits[CFG_BITS-1:0]), $sformatf("cfg after write %0d", i));
      addr = CFG_AW'($urandom_range(CFG_WORDS - 1, 0));
      #1 check(rdata == ref_bits[int'(addr)*32 +: 32], "read back");
    end
    rst_n = 1'b0;
    #3 check(cfg == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
