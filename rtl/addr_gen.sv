// addr_gen: address generator of a local memory unit
//
// Walks an iteration domain of up to three dimensions, one point per cycle, and gives
//     addr = base + i0*stride0 + i1*stride1 + i2*stride2,  0 <= ik < cnt[k]
// (i0 innermost). With free strides the domain is a parallelogram (or its 3-D
// analogue), which covers the affine access patterns of the kernels' loads and stores;
// e.g. A[j-1][k] over j, k in 1..62 of a 64x64 block is base 1, cnt {62, 62, 1},
// stride {1, 64, 0}. A count of 0 behaves as 1.
//
// The address is kept incrementally (no multipliers): the running address, the start
// of the current row and of the current plane. `load` moves to the first point,
// `step` to the next one; `last` is high while the current point is the final one.
// Addresses wrap modulo 2^AG_W. The incremental form is this design's choice.
module addr_gen
  import fpca_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  ag_cfg_t         cfg,
  input  logic            load,
  input  logic            step,
  output logic [AG_W-1:0] addr,
  output logic            last
);

  logic [AG_W-1:0] i0, i1, i2, row, plane;
  logic end0, end1, end2;

  assign end0 = (i0 + 1'b1 >= cfg.cnt[0]);
  assign end1 = (i1 + 1'b1 >= cfg.cnt[1]);
  assign end2 = (i2 + 1'b1 >= cfg.cnt[2]);
  assign last = end0 && end1 && end2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {i0, i1, i2} <= '0;
      {row, plane, addr} <= '0;
    end else if (load) begin
      {i0, i1, i2} <= '0;
      row   <= cfg.base;
      plane <= cfg.base;
      addr  <= cfg.base;
    end else if (step && !last) begin
      if (!end0) begin
        i0   <= i0 + 1'b1;
        addr <= addr + cfg.stride[0];
      end else if (!end1) begin
        i0   <= '0;
        i1   <= i1 + 1'b1;
        row  <= row + cfg.stride[1];
        addr <= row + cfg.stride[1];
      end else begin
        i0    <= '0;
        i1    <= '0;
        i2    <= i2 + 1'b1;
        plane <= plane + cfg.stride[2];
        row   <= plane + cfg.stride[2];
        addr  <= plane + cfg.stride[2];
      end
    end
  end

endmodule
