// ce_tb: self-checking testbench of the computation element.
// Drives a new random operand set every cycle under a series of configurations
// (every first-node, multiplier and third-node mode and every extra delay) and compares
// P with P(n-1) +/- (B x (A +/- D) + C) evaluated in the testbench on the operands of
// exactly 4 + xff cycles earlier, which also checks the latency and the one-per-cycle
// throughput.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module ce_tb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  ce_cfg_t cfg;
  logic [31:0] a, b, c, d, pp, p;
  int checks = 0, failures = 0;

  ce dut (.clk, .cfg, .a, .b, .c, .d, .p_prev(pp), .p);

  logic [31:0] ha [1024], hb [1024], hc [1024], hd [1024], hp [1024];

  function automatic logic [31:0] model(ce_cfg_t k, logic [31:0] A, B, C, D, P);
    logic [31:0] pre, m, t;
    case (k.pre)
      PRE_ADD: pre = A + D;
      PRE_SUB: pre = A - D;
      PRE_PASS_A: pre = A;
      default: pre = D;
    endcase
    case (k.mul)
      MUL_B: m = pre * B;
      MUL_SQUARE: m = pre * pre;
      default: m = pre;
    endcase
    t = m + (k.use_c ? C : 32'd0);
    return (k.use_p ? P : 32'd0) + (k.post_sub ? -t : t);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    n = 0;
    cfg = '0;
    {a, b, c, d, pp} = '0;
    for (int r = 0; r < 48; r++) begin
      @(negedge clk);
      cfg.pre      = pre_op_e'(r % 4);
      cfg.mul      = mul_op_e'((r / 4) % 3);
      cfg.use_c    = 1'(r % 2);
      cfg.use_p    = 1'((r / 2) % 2);
      cfg.post_sub = 1'((r / 3) % 2);
      cfg.xff      = 2'(r % 4);
      for (int t = 0; t < 30; t++) begin
        if (t >= 10) begin
          int src;
          src = n - 4 - int'(cfg.xff);
          checks++;
          if (p !== model(cfg, ha[src % 1024], hb[src % 1024], hc[src % 1024], hd[src % 1024], hp[src % 1024])) begin
            failures++;
            if (failures < 10) $display("ce mismatch cfg=%p got %h", cfg, p);
          end
        end
        a = $urandom(); b = $urandom(); c = $urandom(); d = $urandom(); pp = $urandom();
        if (t % 7 == 0) begin a = 32'hFFFF_FFF0; d = 32'h0000_0013; end
        ha[n % 1024] = a; hb[n % 1024] = b; hc[n % 1024] = c; hd[n % 1024] = d; hp[n % 1024] = pp;
        n++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
