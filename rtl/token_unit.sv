// token_unit: FIFO controller of a local memory unit (double buffering)
//
// The LMU's memory is split into two block-sized spaces used as a FIFO of depth 2
// whose entries are whole data blocks. The producer (the GDTU for an input LMU, the
// computation for an output LMU) fills the space at wr_slot and commits it with
// `produce`; the consumer works on rd_slot and frees it with `consume`. `empty` stops
// the consumer and `full` stops the producer, so computation and off-chip transfer
// overlap and either side stalls the other automatically.
//
// Timing: counters update on the clock edge that samples produce/consume; both in
// the same cycle leave the fill level unchanged. A produce when full or a consume when
// empty is a protocol error and is flagged by assertions. Reset empties the FIFO.
//
// Depth 2 at block granularity with empty/full follows the FPCA architecture; the
// slot pointers and the handshake are this design's choices.
module token_unit #(
  parameter int unsigned DEPTH = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      produce,
  input  logic                      consume,
  output logic [$clog2(DEPTH)-1:0]  wr_slot,
  output logic [$clog2(DEPTH)-1:0]  rd_slot,
  output logic                      empty,
  output logic                      full
);

  logic [$clog2(DEPTH+1)-1:0] level;

  assign empty = (level == '0);
  assign full  = (level == DEPTH[$clog2(DEPTH+1)-1:0]);

  function automatic logic [$clog2(DEPTH)-1:0] inc(logic [$clog2(DEPTH)-1:0] s);
    return (int'(s) == int'(DEPTH) - 1) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level   <= '0;
      wr_slot <= '0;
      rd_slot <= '0;
    end else begin
      if (produce) wr_slot <= inc(wr_slot);
      if (consume) rd_slot <= inc(rd_slot);
      if (produce && !consume)      level <= level + 1'b1;
      else if (consume && !produce) level <= level - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) produce |-> (!full || consume));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) consume |-> !empty);

endmodule
