// iommu: input/output memory management unit shared by all PE clusters
//
// Accelerators work in the user process's virtual address space. A GDTU sends the
// virtual start address and length of a data block; the IOMMU translates it page by
// page through its TLB and answers with a list of contiguous physical segments, each
// ending at a page boundary or at the end of the block (the last one is flagged).
// On a TLB miss it asks the operating system (os_miss_valid / os_miss_vpn) and waits
// for the physical page number (os_fill_valid / os_fill_ppn), installs it and goes on.
//
// Requests wait in a queue of QDEPTH entries, so every cluster can keep several in
// flight; they are served one at a time, in order. The TLB is fully associative with
// round-robin replacement. Pages are 2^PAGE_LOG2 words. Queue depth, TLB size and
// organisation, page size and the OS handshake are this design's choices. Segment
// responses use valid/ready; a response is stable while rsp_valid && !rsp_ready.
// Tags are returned unchanged and route the answer back to its cluster and channel.
module iommu
  import fpca_pkg::*;
#(
  parameter int unsigned TLB_ENTRIES = 16,
  parameter int unsigned QDEPTH      = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  input  xlat_req_t               req,
  output logic                    req_ready,
  output logic                    rsp_valid,
  output xlat_rsp_t               rsp,
  input  logic                    rsp_ready,
  output logic                    os_miss_valid,
  output logic [VA_W-PAGE_LOG2-1:0] os_miss_vpn,
  input  logic                    os_fill_valid,
  input  logic [VA_W-PAGE_LOG2-1:0] os_fill_ppn,
  output logic [31:0]             hits,
  output logic [31:0]             misses
);

  localparam int unsigned PN_W = VA_W - PAGE_LOG2;
  localparam int unsigned PAGE = 1 << PAGE_LOG2;

  typedef enum logic [1:0] {S_IDLE, S_XLAT, S_MISS} state_e;
  state_e state;

  logic q_empty, q_full, q_pop;
  xlat_req_t q_head;

  sfifo #(.W($bits(xlat_req_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(req_valid && !q_full), .din(req), .pop(q_pop),
    .dout(q_head), .empty(q_empty), .full(q_full)
  );
  assign req_ready = !q_full;

  logic [TLB_ENTRIES-1:0]           t_valid;
  logic [TLB_ENTRIES-1:0][PN_W-1:0] t_vpn, t_ppn;
  logic [$clog2(TLB_ENTRIES)-1:0]   victim;

  logic [TAG_W-1:0] cur_tag;
  logic [VA_W-1:0]  cur_va;
  logic [AG_W-1:0]  cur_rem;
  logic [PN_W-1:0]  vpn;
  logic [PAGE_LOG2-1:0] off;
  logic             hit;
  logic [PN_W-1:0]  ppn;
  logic [AG_W:0]    to_page_end;
  logic [AG_W-1:0]  seg_len;

  assign vpn = cur_va[VA_W-1:PAGE_LOG2];
  assign off = cur_va[PAGE_LOG2-1:0];

  always_comb begin
    hit = 1'b0;
    ppn = '0;
    for (int e = 0; e < int'(TLB_ENTRIES); e++)
      if (t_valid[e] && t_vpn[e] == vpn) begin
        hit = 1'b1;
        ppn = t_ppn[e];
      end
    to_page_end = (AG_W+1)'(PAGE) - (AG_W+1)'(off);
    seg_len     = ({1'b0, cur_rem} <= to_page_end) ? cur_rem : to_page_end[AG_W-1:0];
  end

  assign q_pop         = (state == S_IDLE) && !q_empty;
  assign rsp_valid     = (state == S_XLAT) && hit;
  assign rsp.tag       = cur_tag;
  assign rsp.pa        = {ppn, off};
  assign rsp.len       = seg_len;
  assign rsp.last      = (seg_len == cur_rem);
  assign os_miss_valid = (state == S_MISS);
  assign os_miss_vpn   = vpn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t_valid <= '0; t_vpn <= '0; t_ppn <= '0; victim <= '0;
      cur_tag <= '0; cur_va <= '0; cur_rem <= '0;
      hits <= '0; misses <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (!q_empty) begin
            cur_tag <= q_head.tag;
            cur_va  <= q_head.va;
            cur_rem <= q_head.len;
            state   <= S_XLAT;
          end
        S_XLAT:
          if (!hit) begin
            state  <= S_MISS;
            misses <= misses + 1'b1;
          end else if (rsp_ready) begin
            hits    <= hits + 1'b1;
            cur_va  <= cur_va + VA_W'(seg_len);
            cur_rem <= cur_rem - seg_len;
            if (rsp.last) state <= S_IDLE;
          end
        S_MISS:
          if (os_fill_valid) begin
            t_valid[victim] <= 1'b1;
            t_vpn[victim]   <= vpn;
            t_ppn[victim]   <= os_fill_ppn;
            victim <= (int'(victim) == int'(TLB_ENTRIES) - 1) ? '0 : victim + 1'b1;
            state  <= S_XLAT;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rsp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp));

endmodule
