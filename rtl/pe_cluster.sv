// pe_cluster: processing-element cluster of the FPCA
//
// One cluster holds the heterogeneous PEs an accelerator is composed from:
// NUM_CE = 6 computation elements, NUM_LMU = 6 local memory units and NUM_REG = 2
// register chains, joined by one 32-port, 32-bit, pipelined permutation network, plus
// the GDTU (off-chip transfers), the synchronization unit, the controller and the
// configuration unit. Any connection between the PEs used by a DFG can be set in the
// network, so placing a DFG in a cluster never fails for lack of routing.
//
// Network port map (fixed wiring, this design's choice):
//   sources  0..5   CE results P         sinks  4i+0..4i+3  CE i inputs A, B, C, D
//            6..11  LMU outputs                 24..29      LMU inputs
//            12+6r+k register chain r, out k    30, 31      register chain inputs
//            24..31 unused, tied to zero (neighbour-to-neighbour links not built)
// CE i also takes P(n-1) from CE i-1 over a dedicated wire (CE 0 gets zero); register
// chain r's din_prev is the last output of chain r-1 (chain 0 gets zero).
//
// Data path timing: LMU out -> network (2 cycles) -> CE (4 + xff) or register chain
// (its configured delay) -> ... -> LMU in. The compiler turns these delays into the LMU
// countdowns; nothing inside the DFG carries a valid bit.
module pe_cluster
  import fpca_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  // GAM
  input  logic              cmd_valid,
  input  task_t             cmd,
  output logic              cmd_ready,
  output logic              done,
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [31:0]       cfg_wdata,
  // IOMMU
  output logic              xreq_valid,
  output xlat_req_t         xreq,
  input  logic              xreq_ready,
  input  logic              xrsp_valid,
  input  xlat_rsp_t         xrsp,
  output logic              xrsp_ready,
  // system bus
  output logic              mreq_valid,
  output mem_req_t          mreq,
  input  logic              mreq_ready,
  input  logic              mrsp_valid,
  input  mem_rsp_t          mrsp,
  // monitoring
  output logic [NUM_THR-1:0] blk_start,
  output logic [NUM_LMU-1:0] lmu_empty_o,
  output logic [NUM_LMU-1:0] lmu_full_o,
  output logic [31:0]       blocks_computed,
  output logic [31:0]       task_cycles
);

  cluster_cfg_t cfg;

  // ---------------- controller and configuration unit
  logic              cu_we, gdtu_start, gdtu_done;
  logic [CFG_AW-1:0] cu_addr;
  logic [31:0]       cu_wdata, cu_rdata;
  task_t             gdtu_task;
  logic [NUM_THR-1:0] sync_run, thr_start;

  cluster_ctrl u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .done,
    .gam_cfg_we(cfg_we), .gam_cfg_addr(cfg_addr), .gam_cfg_wdata(cfg_wdata),
    .cfg_we(cu_we), .cfg_addr(cu_addr), .cfg_wdata(cu_wdata),
    .gdtu_start, .gdtu_task, .gdtu_done, .sync_run, .thr_start,
    .blocks_computed, .task_cycles
  );

  config_unit u_cfg (
    .clk, .rst_n, .we(cu_we), .addr(cu_addr), .wdata(cu_wdata), .rdata(cu_rdata), .cfg
  );

  // ---------------- permutation network
  logic [NET_PORTS-1:0][DW-1:0] net_in, net_out;

  perm_net #(.N(NET_PORTS), .W(DW)) u_net (.clk, .cfg(cfg.perm), .din(net_in), .dout(net_out));

  // ---------------- computation elements
  logic [NUM_CE-1:0][DW-1:0] ce_p;
  for (genvar i = 0; i < int'(NUM_CE); i++) begin : g_ce
    ce u_ce (
      .clk, .cfg(cfg.ce[i]),
      .a(net_out[4*i]), .b(net_out[4*i+1]), .c(net_out[4*i+2]), .d(net_out[4*i+3]),
      .p_prev(i == 0 ? '0 : ce_p[(i == 0) ? 0 : i-1]),
      .p(ce_p[i])
    );
  end

  // ---------------- register chains
  logic [NUM_REG-1:0][REG_OUTS-1:0][DW-1:0] rc_out;
  for (genvar r = 0; r < int'(NUM_REG); r++) begin : g_rc
    reg_chain u_rc (
      .clk, .cfg(cfg.rc[r]), .din(net_out[30+r]),
      .din_prev(r == 0 ? '0 : rc_out[(r == 0) ? 0 : r-1][REG_OUTS-1]),
      .dout(rc_out[r])
    );
  end

  // ---------------- local memory units
  logic [NUM_LMU-1:0]           l_start, l_empty, l_full, l_ready, l_busy, l_done;
  logic [NUM_LMU-1:0][DW-1:0]   l_out;
  logic [NUM_LMU-1:0]           g_we, g_commit, g_re, g_release;
  logic [NUM_LMU-1:0][AG_W-1:0] g_waddr, g_raddr;
  logic [NUM_LMU-1:0][DW-1:0]   g_wdata, g_rdata;
  logic [NUM_LMU-1:0]           l_en;
  logic [NUM_LMU-1:0][THR_W-1:0] l_thr;

  for (genvar l = 0; l < int'(NUM_LMU); l++) begin : g_lmu
    lmu #(.BLOCK_WORDS(BLOCK_WORDS)) u_lmu (
      .clk, .rst_n, .cfg(cfg.lmu[l]), .start(l_start[l]),
      .ce_in(net_out[24+l]), .ce_out(l_out[l]),
      .gd_we(g_we[l]), .gd_waddr(g_waddr[l]), .gd_wdata(g_wdata[l]), .gd_commit(g_commit[l]),
      .gd_re(g_re[l]), .gd_raddr(g_raddr[l]), .gd_rdata(g_rdata[l]), .gd_release(g_release[l]),
      .empty(l_empty[l]), .full(l_full[l]), .busy(l_busy[l]), .ready(l_ready[l]), .done(l_done[l])
    );
    assign l_en[l]  = cfg.lmu[l].enable;
    assign l_thr[l] = cfg.lmu[l].thread;
  end

  always_comb begin
    net_in = '0;
    for (int i = 0; i < int'(NUM_CE); i++)  net_in[i]   = ce_p[i];
    for (int l = 0; l < int'(NUM_LMU); l++) net_in[6+l] = l_out[l];
    for (int r = 0; r < int'(NUM_REG); r++)
      for (int k = 0; k < int'(REG_OUTS); k++) net_in[12 + REG_OUTS*r + k] = rc_out[r][k];
  end

  // ---------------- synchronization unit
  sync_unit u_sync (
    .clk, .rst_n, .run(sync_run), .lmu_en(l_en), .lmu_thread(l_thr), .lmu_ready(l_ready),
    .thr_start, .lmu_start(l_start)
  );

  // ---------------- global data transfer unit
  gdtu u_gdtu (
    .clk, .rst_n, .cfg(cfg.ch), .start(gdtu_start), .tsk(gdtu_task), .done(gdtu_done),
    .xreq_valid, .xreq, .xreq_ready, .xrsp_valid, .xrsp, .xrsp_ready,
    .mreq_valid, .mreq, .mreq_ready, .mrsp_valid, .mrsp,
    .lmu_empty(l_empty), .lmu_full(l_full),
    .lmu_we(g_we), .lmu_waddr(g_waddr), .lmu_wdata(g_wdata), .lmu_commit(g_commit),
    .lmu_re(g_re), .lmu_raddr(g_raddr), .lmu_rdata(g_rdata), .lmu_release(g_release)
  );

  assign blk_start   = thr_start;
  assign lmu_empty_o = l_empty;
  assign lmu_full_o  = l_full;

endmodule
