// fpca_top: fully pipelined, dynamically composable CGRA (FPCA)
//
// A ROWS x COLS array of PE clusters (pe_cluster) with the chip-level parts that
// serve them: the global accelerator manager (gam) that composes copies of an
// accelerator on idle clusters and distributes subtasks, the IOMMU (iommu) that
// translates the GDTUs' virtual block addresses page by page, and the system bus
// (sys_bus) that joins all GDTUs to the off-chip memory port.
//
// Outside this module: the host CPU (drives the host_* ports of the GAM), the
// operating system (serves TLB misses on os_*), and the off-chip DRAM behind the
// dram_* port (one-word requests with valid/ready, in-order tagged read responses).
// The neighbour-to-neighbour links between clusters are not built; each cluster's
// spare network inputs are tied to zero.
//
// Requests from the clusters to the IOMMU are merged round robin; the cluster number
// goes into the upper tag bits and routes the answers back.
//
// The simulator's lint reports m_req_ready as circular combinational logic. The loop is
// only at the granularity of the whole vector: the system bus grants ready from the valids of
// all clusters, and a cluster's memory request valid comes from DMAC state and never
// from its ready, so no bit depends on itself.
//
// The 4x4 array, the GAM, the IOMMU, the system bus and the off-chip interface follow
// the FPCA architecture; the port protocols, the tag routing and the one-word memory
// port are this design's choices.
module fpca_top
  import fpca_pkg::*;
#(
  parameter int unsigned ROWS        = 4,
  parameter int unsigned COLS        = 4,
  parameter int unsigned BLOCK_WORDS = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host CPU
  input  logic                       host_alloc_valid,
  input  logic [$clog2(ROWS*COLS+1)-1:0] host_alloc_copies,
  output logic                       host_alloc_ready,
  output logic                       host_alloc_done,
  output logic [ROWS*COLS-1:0]       host_alloc_mask,
  input  logic                       host_cfg_we,
  input  logic [CFG_AW-1:0]          host_cfg_addr,
  input  logic [31:0]                host_cfg_wdata,
  input  logic                       host_launch_valid,
  input  task_t                      host_launch_task,
  output logic                       host_launch_ready,
  output logic [1:0]                 host_launch_id,   // task slot of the next launch
  output logic [3:0]                 host_task_done,   // per task slot
  output logic [ROWS*COLS-1:0]       host_busy_mask,
  // off-chip DRAM (I/O interface)
  output logic                       dram_req_valid,
  output mem_req_t                   dram_req,
  input  logic                       dram_req_ready,
  input  logic                       dram_rsp_valid,
  input  mem_rsp_t                   dram_rsp,
  // operating system, TLB misses
  output logic                       os_miss_valid,
  output logic [VA_W-PAGE_LOG2-1:0]  os_miss_vpn,
  input  logic                       os_fill_valid,
  input  logic [VA_W-PAGE_LOG2-1:0]  os_fill_ppn,
  // monitoring
  output logic [ROWS*COLS-1:0][NUM_THR-1:0] blk_start,
  output logic [ROWS*COLS-1:0][NUM_LMU-1:0] lmu_full,
  output logic [31:0]                tlb_hits,
  output logic [31:0]                tlb_misses
);

  localparam int unsigned NCL = ROWS * COLS;
  localparam int unsigned CLW = TAG_W - CH_W;

  // GAM <-> clusters
  logic [NCL-1:0]    c_cmd_valid, c_cmd_ready, c_done, c_cfg_we;
  task_t             c_cmd;
  logic [CFG_AW-1:0] c_cfg_addr;
  logic [31:0]       c_cfg_wdata;

  gam #(.NCL(NCL)) u_gam (
    .clk, .rst_n,
    .alloc_valid(host_alloc_valid), .alloc_copies(host_alloc_copies), .alloc_ready(host_alloc_ready),
    .alloc_done(host_alloc_done), .alloc_mask(host_alloc_mask),
    .cfg_we(host_cfg_we), .cfg_addr(host_cfg_addr), .cfg_wdata(host_cfg_wdata),
    .launch_valid(host_launch_valid), .launch_task(host_launch_task), .launch_ready(host_launch_ready),
    .launch_id(host_launch_id), .task_done(host_task_done), .busy_mask(host_busy_mask),
    .cl_cmd_valid(c_cmd_valid), .cl_cmd(c_cmd), .cl_cmd_ready(c_cmd_ready), .cl_done(c_done),
    .cl_cfg_we(c_cfg_we), .cl_cfg_addr(c_cfg_addr), .cl_cfg_wdata(c_cfg_wdata)
  );

  // clusters
  logic      [NCL-1:0] x_req_valid, x_req_ready, x_rsp_valid, x_rsp_ready;
  xlat_req_t [NCL-1:0] x_req;
  logic      [NCL-1:0] m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t  [NCL-1:0] m_req;
  mem_rsp_t  [NCL-1:0] m_rsp;
  xlat_rsp_t           io_rsp;

  for (genvar i = 0; i < int'(NCL); i++) begin : g_cl
    logic [31:0] blocks_computed, task_cycles;
    logic [NUM_LMU-1:0] empty_unused;
    pe_cluster #(.BLOCK_WORDS(BLOCK_WORDS)) u_cluster (
      .clk, .rst_n,
      .cmd_valid(c_cmd_valid[i]), .cmd(c_cmd), .cmd_ready(c_cmd_ready[i]), .done(c_done[i]),
      .cfg_we(c_cfg_we[i]), .cfg_addr(c_cfg_addr), .cfg_wdata(c_cfg_wdata),
      .xreq_valid(x_req_valid[i]), .xreq(x_req[i]), .xreq_ready(x_req_ready[i]),
      .xrsp_valid(x_rsp_valid[i]), .xrsp(io_rsp), .xrsp_ready(x_rsp_ready[i]),
      .mreq_valid(m_req_valid[i]), .mreq(m_req[i]), .mreq_ready(m_req_ready[i]),
      .mrsp_valid(m_rsp_valid[i]), .mrsp(m_rsp[i]),
      .blk_start(blk_start[i]), .lmu_empty_o(empty_unused), .lmu_full_o(lmu_full[i]),
      .blocks_computed, .task_cycles
    );
  end

  // IOMMU request merge, cluster number into the tag
  logic [NCL-1:0][$bits(xlat_req_t)-1:0] x_pkt;
  logic [$bits(xlat_req_t)-1:0]          x_out;
  logic                                  io_req_valid, io_req_ready, io_rsp_valid, io_rsp_ready;

  always_comb begin
    for (int i = 0; i < int'(NCL); i++) begin
      xlat_req_t r;
      r = x_req[i];
      r.tag = {CLW'(i), x_req[i].tag[CH_W-1:0]};
      x_pkt[i] = r;
    end
  end

  rr_arb_mux #(.N(NCL), .W($bits(xlat_req_t))) u_xarb (
    .clk, .rst_n, .in_valid(x_req_valid), .in_data(x_pkt), .in_ready(x_req_ready),
    .out_valid(io_req_valid), .out_data(x_out), .out_ready(io_req_ready)
  );

  iommu u_iommu (
    .clk, .rst_n,
    .req_valid(io_req_valid), .req(xlat_req_t'(x_out)), .req_ready(io_req_ready),
    .rsp_valid(io_rsp_valid), .rsp(io_rsp), .rsp_ready(io_rsp_ready),
    .os_miss_valid, .os_miss_vpn, .os_fill_valid, .os_fill_ppn,
    .hits(tlb_hits), .misses(tlb_misses)
  );

  always_comb begin
    io_rsp_ready = 1'b0;
    for (int i = 0; i < int'(NCL); i++) begin
      x_rsp_valid[i] = io_rsp_valid && (int'(io_rsp.tag[TAG_W-1:CH_W]) == i);
      if (int'(io_rsp.tag[TAG_W-1:CH_W]) == i) io_rsp_ready = x_rsp_ready[i];
    end
  end

  sys_bus #(.NCL(NCL)) u_bus (
    .clk, .rst_n,
    .cl_req_valid(m_req_valid), .cl_req(m_req), .cl_req_ready(m_req_ready),
    .cl_rsp_valid(m_rsp_valid), .cl_rsp(m_rsp),
    .dram_req_valid, .dram_req, .dram_req_ready, .dram_rsp_valid, .dram_rsp
  );

endmodule
