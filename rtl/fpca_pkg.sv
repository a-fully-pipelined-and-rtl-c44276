// fpca_pkg: types and constants shared by the FPCA (fully pipelined, composable CGRA).
//
// The cluster make-up follows the module allocation {REG, CE, LMU} = {2, 6, 6} and the
// 32-port permutation network chosen in the design-space exploration; words are 32 bits.
// Field widths of the configuration records (address-generator fields, countdown, tags,
// page size) are this design's own choices and are sized so that a 64x64 data block
// (4096 words) and its double buffer can be described.
//
// Configuration bits are grouped in packed structs; cluster_cfg_t is the whole
// configuration of one PE cluster, held by the configuration unit and written 32 bits
// at a time (word w holds bits [32w+31 : 32w] of the packed struct).
package fpca_pkg;

  parameter int unsigned DW        = 32;   // datapath word
  parameter int unsigned NUM_CE    = 6;
  parameter int unsigned NUM_LMU   = 6;
  parameter int unsigned NUM_REG   = 2;
  parameter int unsigned NET_PORTS = 32;
  parameter int unsigned REG_OUTS  = 6;    // register-chain outputs
  parameter int unsigned REG_SEG   = 3;    // bypassable FFs in front of each output
  parameter int unsigned XFF_MAX   = 3;    // extra output delay of a CE
  parameter int unsigned NUM_CH    = 4;    // GDTU channels
  parameter int unsigned NUM_THR   = 2;    // DFG threads in the synchronization unit
  parameter int unsigned AG_W      = 13;   // address-generator field width
  parameter int unsigned CD_W      = 8;    // LMU countdown width
  parameter int unsigned VA_W      = 32;   // word addresses, virtual and physical
  parameter int unsigned TAG_W     = 8;    // {cluster, channel}
  parameter int unsigned CH_W      = 2;    // channel part of a tag
  parameter int unsigned PAGE_LOG2 = 10;   // 1024-word (4 KiB) pages
  parameter int unsigned SUB_W     = 16;   // subtask ids and counts
  parameter int unsigned THR_W     = 1;

  // Benes network with n ports has n/2 * (2*log2(n) - 1) switches, one config bit each.
  function automatic int unsigned benes_bits(int unsigned n);
    return (n / 2) * (2 * $clog2(n) - 1);
  endfunction
  parameter int unsigned PERM_BITS = benes_bits(NET_PORTS);  // 144

  // ---------------- computation element ----------------
  typedef enum logic [1:0] {PRE_ADD = 2'd0, PRE_SUB = 2'd1, PRE_PASS_A = 2'd2, PRE_PASS_D = 2'd3} pre_op_e;
  typedef enum logic [1:0] {MUL_BYPASS = 2'd0, MUL_B = 2'd1, MUL_SQUARE = 2'd2} mul_op_e;

  typedef struct packed {
    pre_op_e    pre;       // first node: A+D, A-D, A or D
    mul_op_e    mul;       // second node: pass, x B, or square of the first node
    logic       use_c;     // third node adds C
    logic       use_p;     // third node adds the neighbour CE's result P(n-1)
    logic       post_sub;  // P = P(n-1) - (prod + C) instead of +
    logic [1:0] xff;       // extra output delay, 0..XFF_MAX cycles
  } ce_cfg_t;

  // ---------------- register chain ----------------
  typedef struct packed {
    logic                      use_prev;  // chain input from the previous register chain
    logic [REG_OUTS-1:0][1:0]  seg_len;   // active FFs in front of output k (0..REG_SEG)
  } reg_cfg_t;

  // ---------------- address generator / LMU ----------------
  typedef struct packed {
    logic [AG_W-1:0]      base;
    logic [2:0][AG_W-1:0] cnt;     // iterations per dimension, 0 counts as 1
    logic [2:0][AG_W-1:0] stride;  // two's complement increments
  } ag_cfg_t;

  typedef struct packed {
    logic             enable;
    logic             is_output;   // stores results (else loads operands)
    logic [THR_W-1:0] thread;
    logic [CD_W-1:0]  countdown;   // cycles between start and the first access
    ag_cfg_t          ag;
  } lmu_cfg_t;

  // ---------------- GDTU channel ----------------
  typedef struct packed {
    logic               enable;
    logic               to_dram;      // 1: write back LMU -> DRAM, 0: prefetch DRAM -> LMUs
    logic [NUM_LMU-1:0] lmu_mask;     // LMUs served (several = broadcast)
    logic [AG_W-1:0]    block_words;  // words per data block
    logic [VA_W-1:0]    va_stride;    // virtual address step between subtasks
  } ch_cfg_t;

  typedef struct packed {
    ce_cfg_t  [NUM_CE-1:0]  ce;
    reg_cfg_t [NUM_REG-1:0] rc;
    lmu_cfg_t [NUM_LMU-1:0] lmu;
    logic     [PERM_BITS-1:0] perm;
    ch_cfg_t  [NUM_CH-1:0]  ch;
  } cluster_cfg_t;

  parameter int unsigned CFG_BITS  = $bits(cluster_cfg_t);
  parameter int unsigned CFG_WORDS = (CFG_BITS + 31) / 32;
  parameter int unsigned CFG_AW    = $clog2(CFG_WORDS);

  // ---------------- task handed from the GAM to a cluster ----------------
  typedef struct packed {
    logic [SUB_W-1:0]            first;   // first subtask id
    logic [SUB_W-1:0]            count;   // number of subtasks
    logic [NUM_CH-1:0][VA_W-1:0] base_va; // start of each channel's array
  } task_t;

  // ---------------- IOMMU ----------------
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [VA_W-1:0]  va;
    logic [AG_W-1:0]  len;    // words
  } xlat_req_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [VA_W-1:0]  pa;
    logic [AG_W-1:0]  len;    // words in this contiguous segment
    logic             last;   // last segment of the request
  } xlat_rsp_t;

  // ---------------- memory (system bus) ----------------
  typedef struct packed {
    logic             we;
    logic [VA_W-1:0]  addr;
    logic [DW-1:0]    wdata;
    logic [TAG_W-1:0] tag;
  } mem_req_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [DW-1:0]    rdata;
  } mem_rsp_t;

endpackage
