// sfifo: small synchronous FIFO (first word fall-through)
//
// DEPTH entries of W bits. `dout` shows the oldest entry while `empty` is low; `pop`
// removes it and `push` appends `din`, both on the clock edge; push and pop in the same
// cycle are allowed even when full (the pop makes room). Reset empties it.
//
// A helper of this design (IOMMU request queue, GDTU segment queues); not part of the
// FPCA architecture as such.
module sfifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0] q [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign empty = (cnt == '0);
  assign full  = (int'(cnt) == int'(DEPTH));
  assign dout  = q[rp];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk)
    if (push && (!full || pop)) q[wp] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else begin
      if (push && (!full || pop)) wp <= nxt(wp);
      if (pop && !empty) rp <= nxt(rp);
      if ((push && (!full || pop)) && !(pop && !empty)) cnt <= cnt + 1'b1;
      else if (!(push && (!full || pop)) && (pop && !empty)) cnt <= cnt - 1'b1;
    end
  end

endmodule
