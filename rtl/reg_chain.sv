// reg_chain: register chain, one input and NOUT delayed copies of it
//
// The permutation network cannot fan one source out to several sinks, and the CEs
// that share an operand consume it in different cycles. The register chain solves
// both: the data word moves along a chain of flip-flops every cycle, and after every
// SEG flip-flops the chain is tapped to an output. Flip-flops are bypassed by
// configuration: segment k keeps its first cfg.seg_len[k] flip-flops (0..SEG) and
// skips the rest, so output k carries the input delayed by
//     delay(k) = seg_len[0] + ... + seg_len[k]
// cycles. A later output reuses the delay of an earlier one, which saves flip-flops.
// With seg_len = 0 a segment is a wire, so output 0 can be an undelayed copy.
// The chain input is either `din` or `din_prev`, the last output of the previous
// register chain, for delays longer than one chain (cfg.use_prev).
//
// NOUT = 6 follows the cluster's port budget (one input, six outputs); three
// flip-flops per segment is this design's choice, the smallest that gives the
// example delays 1, 3 and 6 with 1, 2 and 3 active flip-flops in consecutive segments.
module reg_chain
  import fpca_pkg::*;
#(
  parameter int unsigned W    = DW,
  parameter int unsigned NOUT = REG_OUTS,
  parameter int unsigned SEG  = REG_SEG
) (
  input  logic                   clk,
  input  reg_cfg_t               cfg,
  input  logic [W-1:0]           din,
  input  logic [W-1:0]           din_prev,
  output logic [NOUT-1:0][W-1:0] dout
);

  logic [W-1:0] ff [NOUT][SEG];
  logic [W-1:0] seg_in [NOUT];

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(NOUT); k++) begin
      ff[k][0] <= seg_in[k];
      for (int i = 1; i < int'(SEG); i++) ff[k][i] <= ff[k][i-1];
    end
  end

  // Walk the chain from the input: each segment starts where the previous output ends.
  always_comb begin
    logic [W-1:0] x;
    x = cfg.use_prev ? din_prev : din;
    for (int k = 0; k < int'(NOUT); k++) begin
      seg_in[k] = x;
      dout[k]   = x;
      for (int i = 0; i < int'(SEG); i++)
        if (int'(cfg.seg_len[k]) == i + 1) dout[k] = ff[k][i];
      x = dout[k];
    end
  end

endmodule
