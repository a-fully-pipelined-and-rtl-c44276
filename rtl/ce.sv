// ce: computation element, a fully pipelined three-node datapath
//
//   P = P(n-1) +/- ( B x (A +/- D) + C )
//
// The three heterogeneous nodes (two-input adder, two-input multiplier, three-input
// adder) and the register placement follow the DSP-block style pattern of the FPCA:
// A and D are registered once before the first node, B twice before the multiplier,
// C and the neighbour's P(n-1) three times before the last adder, the sum is
// registered once more and then passes a configurable extra delay (xFF, 0..XFF_MAX).
// Any subset of the expression is selected by the configuration: the first node can
// add, subtract or pass A or D; the multiplier can pass, multiply by B, or square the
// first node's result (squaring is this design's addition, needed to evaluate the
// (c-d)^2 terms of a gradient kernel in one CE); C and P(n-1) can each be dropped.
//
// Timing: inputs sampled in cycle t give P in cycle t + 4 + cfg.xff. A new set of
// inputs is accepted every cycle; there is no valid bit, as the schedule is fixed at
// compile time. Arithmetic is 32-bit two's complement, keeping the low word of the
// product (the number format is this design's choice).
module ce
  import fpca_pkg::*;
#(
  parameter int unsigned W    = DW,
  parameter int unsigned XMAX = XFF_MAX
) (
  input  logic         clk,
  input  ce_cfg_t      cfg,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [W-1:0] p_prev,  // dedicated link from the neighbouring CE
  output logic [W-1:0] p
);

  logic [W-1:0] a_q, d_q;
  logic [W-1:0] b_q [2];
  logic [W-1:0] c_q [3];
  logic [W-1:0] pp_q [3];
  logic [W-1:0] pre_q, mul_q, post_q;
  logic [W-1:0] pre_n, mul_n, post_n, term;
  logic [W-1:0] xff_q [XMAX];

  always_comb begin
    unique case (cfg.pre)
      PRE_ADD:    pre_n = a_q + d_q;
      PRE_SUB:    pre_n = a_q - d_q;
      PRE_PASS_A: pre_n = a_q;
      default:    pre_n = d_q;
    endcase
    unique case (cfg.mul)
      MUL_B:      mul_n = pre_q * b_q[1];
      MUL_SQUARE: mul_n = pre_q * pre_q;
      default:    mul_n = pre_q;
    endcase
    term   = mul_q + (cfg.use_c ? c_q[2] : '0);
    post_n = (cfg.use_p ? pp_q[2] : '0) + (cfg.post_sub ? -term : term);
  end

  always_ff @(posedge clk) begin
    // input registers
    a_q      <= a;
    d_q      <= d;
    b_q[0]   <= b;
    c_q[0]   <= c;
    pp_q[0]  <= p_prev;
    // stage 1
    pre_q    <= pre_n;
    b_q[1]   <= b_q[0];
    c_q[1]   <= c_q[0];
    pp_q[1]  <= pp_q[0];
    // stage 2
    mul_q    <= mul_n;
    c_q[2]   <= c_q[1];
    pp_q[2]  <= pp_q[1];
    // stage 3
    post_q   <= post_n;
    // extra delay line
    xff_q[0] <= post_q;
    for (int i = 1; i < int'(XMAX); i++) xff_q[i] <= xff_q[i-1];
  end

  always_comb begin
    p = post_q;
    for (int i = 0; i < int'(XMAX); i++)
      if (int'(cfg.xff) == i + 1) p = xff_q[i];
  end

endmodule
