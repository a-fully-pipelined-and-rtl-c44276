// reg_chain_tb: self-checking testbench of the register chain.
// Sets random segment lengths (0..3 active flip-flops per output) and input selects,
// streams a new random word every cycle and checks every output against the input of
// exactly seg_len[0] + ... + seg_len[k] cycles earlier. Includes the example delays
// 1, 3, 6 obtained with 1, 2, 3 active flip-flops in consecutive segments.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module reg_chain_tb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  reg_cfg_t cfg;
  logic [31:0] din, din_prev;
  logic [REG_OUTS-1:0][31:0] dout;
  logic [31:0] h [64];
  int checks = 0, failures = 0;

  reg_chain dut (.clk, .cfg, .din, .din_prev, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    n = 0;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      cfg.use_prev = 1'(r % 3 == 2);
      for (int k = 0; k < int'(REG_OUTS); k++) cfg.seg_len[k] = 2'($urandom_range(3, 0));
      if (r == 0) begin
        cfg.use_prev = 1'b0;
        cfg.seg_len = '0;
        cfg.seg_len[1] = 2'd1; cfg.seg_len[2] = 2'd2; cfg.seg_len[3] = 2'd3;
      end
      for (int t = 0; t < 40; t++) begin
        din = $urandom(); din_prev = $urandom();
        h[n % 64] = cfg.use_prev ? din_prev : din;
        #1;
        if (t >= 20) begin
          int dly;
          dly = 0;
          for (int k = 0; k < int'(REG_OUTS); k++) begin
            dly += int'(cfg.seg_len[k]);
            checks++;
            if (dout[k] !== h[(n - dly) % 64]) begin
              failures++;
              if (failures < 10) $display("out %0d delay %0d: got %h want %h", k, dly, dout[k], h[(n - dly) % 64]);
            end
          end
          if (r == 0) begin
            checks++;
            if (dout[1] !== h[(n - 1) % 64] || dout[2] !== h[(n - 3) % 64] || dout[3] !== h[(n - 6) % 64]) failures++;
          end
        end
        n++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
