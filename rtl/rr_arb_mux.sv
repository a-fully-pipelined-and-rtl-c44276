// rr_arb_mux: round-robin arbiter and multiplexer for valid/ready requesters
//
// N requesters offer a W-bit payload with `in_valid`; one of them is granted and its
// payload passed to the output. The grant rotates: after a transfer, the requester
// after the winner has the highest priority, so no requester starves. `in_ready[i]` is
// high for the granted requester when the output is ready. Combinational from request
// to grant; the priority pointer is the only state.
//
// A helper of this design (used by the GDTU, the system bus and the top); the FPCA
// architecture names the shared buses but not their arbitration.
module rr_arb_mux #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        in_valid,
  input  logic [N-1:0][W-1:0] in_data,
  output logic [N-1:0]        in_ready,
  output logic                out_valid,
  output logic [W-1:0]        out_data,
  input  logic                out_ready
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr, out_idx;

  always_comb begin
    out_valid = 1'b0;
    out_idx   = '0;
    for (int k = int'(N) - 1; k >= 0; k--) begin
      logic [IW-1:0] i;
      i = IW'((int'(ptr) + k) % int'(N));
      if (in_valid[i]) begin
        out_valid = 1'b1;
        out_idx   = i;
      end
    end
    out_data = in_data[out_idx];
    in_ready = '0;
    in_ready[out_idx] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (out_valid && out_ready)
      ptr <= (int'(out_idx) == int'(N) - 1) ? '0 : out_idx + 1'b1;
  end

endmodule
