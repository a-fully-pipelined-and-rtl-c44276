// benes: combinational Benes permutation fabric of 2x2 switches, built recursively
//
// An N-port Benes network is a column of N/2 input switches, two N/2-port Benes
// networks (upper and lower) and a column of N/2 output switches; a 2-port network is a
// single switch. It has N/2 * (2*log2(N) - 1) switches (144 for N = 32) and can
// connect its outputs to any permutation of its inputs.
//
// One configuration bit per switch, 1 = crossed. Bit order (this design's choice):
//   cfg[N/2-1:0]                     input column, switch k joins ports 2k and 2k+1
//   next benes_bits(N/2) bits        upper sub-network
//   next benes_bits(N/2) bits        lower sub-network
//   cfg[top N/2 bits]                output column
// Input switch k feeds port k of both sub-networks (straight: 2k to the upper one);
// output switch k takes port k of both (straight: upper to 2k). N must be a power of
// two, at least 2. No registers: perm_net adds the pipeline stages.
//
// The simulator's lint reports up_out and lo_out as undriven. The warning comes from
// the unelaborated template of this self-instantiating module: in the elaborated
// network both are driven by the sub-network outputs. Routing every permutation
// through the full 32-port network in simulation shows that every path is connected.
module benes
  import fpca_pkg::*;
#(
  parameter int unsigned N = NET_PORTS,
  parameter int unsigned W = DW
) (
  input  logic [benes_bits(N)-1:0] cfg,
  input  logic [N-1:0][W-1:0]      din,
  output logic [N-1:0][W-1:0]      dout
);

  if (N == 2) begin : g_leaf
    assign dout[0] = cfg[0] ? din[1] : din[0];
    assign dout[1] = cfg[0] ? din[0] : din[1];
  end else begin : g_rec
    localparam int unsigned H  = N / 2;
    localparam int unsigned SS = benes_bits(H);
    logic [H-1:0][W-1:0] up_in, lo_in, up_out, lo_out;

    always_comb begin
      for (int k = 0; k < int'(H); k++) begin
        up_in[k] = cfg[k] ? din[2*k+1] : din[2*k];
        lo_in[k] = cfg[k] ? din[2*k]   : din[2*k+1];
      end
    end

    benes #(.N(H), .W(W)) u_upper (.cfg(cfg[H+SS-1:H]),      .din(up_in), .dout(up_out));
    benes #(.N(H), .W(W)) u_lower (.cfg(cfg[H+2*SS-1:H+SS]), .din(lo_in), .dout(lo_out));

    always_comb begin
      for (int k = 0; k < int'(H); k++) begin
        dout[2*k]   = cfg[H+2*SS+k] ? lo_out[k] : up_out[k];
        dout[2*k+1] = cfg[H+2*SS+k] ? up_out[k] : lo_out[k];
      end
    end
  end

endmodule
