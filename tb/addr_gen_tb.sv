// addr_gen_tb: self-checking testbench of the LMU address generator.
// Runs the stencil pattern A[j-1][k] (j, k in 1..62 of a 64x64 block, which must give
// 1..62, 65..126, ...), a 3-D domain with a skewed (parallelogram) outer stride and
// negative strides, and random domains, comparing each address with
// base + i0*s0 + i1*s1 + i2*s2 and `last` with the final point.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module addr_gen_tb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, load, step, last;
  ag_cfg_t cfg;
  logic [AG_W-1:0] addr;
  int checks = 0, failures = 0;

  addr_gen dut (.clk, .rst_n, .cfg, .load, .step, .addr, .last);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int base, int c0, int c1, int c2, int s0, int s1, int s2);
    cfg.base = AG_W'(base);
    cfg.cnt[0] = AG_W'(c0); cfg.cnt[1] = AG_W'(c1); cfg.cnt[2] = AG_W'(c2);
    cfg.stride[0] = AG_W'(s0); cfg.stride[1] = AG_W'(s1); cfg.stride[2] = AG_W'(s2);
    @(negedge clk); load = 1'b1;
    @(negedge clk); load = 1'b0; step = 1'b1;
    for (int i2 = 0; i2 < (c2 == 0 ? 1 : c2); i2++)
      for (int i1 = 0; i1 < (c1 == 0 ? 1 : c1); i1++)
        for (int i0 = 0; i0 < (c0 == 0 ? 1 : c0); i0++) begin
          logic [AG_W-1:0] want;
          bit want_last;
          want = AG_W'(base + i0 * s0 + i1 * s1 + i2 * s2);
          want_last = (i0 == (c0 == 0 ? 0 : c0 - 1)) && (i1 == (c1 == 0 ? 0 : c1 - 1)) && (i2 == (c2 == 0 ? 0 : c2 - 1));
          checks++;
          if (addr !== want || last !== want_last) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d,%0d) got %0d/%0b want %0d/%0b", i0, i1, i2, addr, last, want, want_last);
          end
          @(negedge clk);
        end
    step = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; step = 1'b0; cfg = '0;
    #12 rst_n = 1'b1;
    run(1, 62, 62, 1, 1, 64, 0);          // A[j-1][k]
    run(65, 62, 62, 1, 1, 64, 0);         // A[j][k]
    run(5, 4, 3, 5, 2, 17, 9);            // 3-D, skewed outer strides
    run(4000, 7, 6, 2, -1, -30, -500);    // negative strides
    run(9, 0, 1, 0, 3, 3, 3);             // zero counts act as one
    for (int r = 0; r < 20; r++)
      run($urandom_range(8191, 0), $urandom_range(9, 1), $urandom_range(9, 1), $urandom_range(4, 1),
          $urandom_range(40, 0) - 20, $urandom_range(400, 0) - 200, $urandom_range(4000, 0) - 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
