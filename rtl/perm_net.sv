// perm_net: the cluster's 32-bit, fully pipelined permutation data network
//
// Connects the outputs of CEs, LMUs and register chains to their inputs. The
// connection is fixed by configuration bits while an accelerator runs, so there is no
// arbitration and no flow control: every path carries one word per cycle. The switch
// fabric is a Benes network (see benes.sv); any permutation of the inputs can be set,
// but one input reaches only one output.
//
// Timing: a word presented at din in cycle t leaves dout in cycle t + 2. The network
// registers its inputs and its outputs; the number and place of the pipeline registers
// is this design's choice (two register ranks of 32 x 32 bits).
module perm_net
  import fpca_pkg::*;
#(
  parameter int unsigned N = NET_PORTS,
  parameter int unsigned W = DW
) (
  input  logic                     clk,
  input  logic [benes_bits(N)-1:0] cfg,
  input  logic [N-1:0][W-1:0]      din,
  output logic [N-1:0][W-1:0]      dout
);

  logic [N-1:0][W-1:0] in_q, sw_out;

  benes #(.N(N), .W(W)) u_fabric (.cfg(cfg), .din(in_q), .dout(sw_out));

  always_ff @(posedge clk) begin
    in_q <= din;
    dout <= sw_out;
  end

endmodule
