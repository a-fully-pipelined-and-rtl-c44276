// gam: global accelerator manager
//
// Composes accelerators on the PE clusters at run time and hands them work. It keeps
// the resource table, the state of every cluster (idle, reserved for an accelerator
// being composed, or running), and offers the host three operations:
//   alloc  - reserve up to `alloc_copies` idle clusters (lowest numbers first) for
//            copies of one accelerator; the chosen set comes back in alloc_mask with
//            alloc_done. Fewer (even none) are granted when fewer are idle.
//   config - configuration words written by the host go to every cluster of the last
//            allocation at once, so all copies are composed identically.
//   launch - the task (first subtask, number of subtasks, array base addresses) is
//            split into contiguous, near-equal ranges, one per allocated cluster
//            (count/n, the first count%n clusters one more), and sent to their
//            controllers. Clusters return to idle as their controllers report done.
// Up to NSET launched tasks (of different accelerators) can be in flight at once.
// Each launch takes a free slot, announced beforehand on launch_id; task_done[s]
// pulses when the last cluster of the task in slot s finishes, which frees the slot.
// Each cluster runs one accelerator at a time here; the granularity of allocation
// (whole clusters), the split rule, the task slots and the host handshakes are this
// design's choices.
module gam
  import fpca_pkg::*;
#(
  parameter int unsigned NCL  = 16,
  parameter int unsigned NSET = 4,
  localparam int unsigned SW  = (NSET > 1) ? $clog2(NSET) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host: allocation
  input  logic                     alloc_valid,
  input  logic [$clog2(NCL+1)-1:0] alloc_copies,
  output logic                     alloc_ready,
  output logic                     alloc_done,
  output logic [NCL-1:0]           alloc_mask,
  // host: configuration
  input  logic                     cfg_we,
  input  logic [CFG_AW-1:0]        cfg_addr,
  input  logic [31:0]              cfg_wdata,
  // host: launch
  input  logic                     launch_valid,
  input  task_t                    launch_task,
  output logic                     launch_ready,
  output logic [SW-1:0]            launch_id,     // slot the next launch will use
  output logic [NSET-1:0]          task_done,
  output logic [NCL-1:0]           busy_mask,
  // clusters
  output logic [NCL-1:0]           cl_cmd_valid,
  output task_t                    cl_cmd,
  input  logic [NCL-1:0]           cl_cmd_ready,
  input  logic [NCL-1:0]           cl_done,
  output logic [NCL-1:0]           cl_cfg_we,
  output logic [CFG_AW-1:0]        cl_cfg_addr,
  output logic [31:0]              cl_cfg_wdata
);

  typedef enum logic [1:0] {R_IDLE, R_RESERVED, R_RUNNING} res_e;
  res_e [NCL-1:0] table_q;

  typedef enum logic [1:0] {S_IDLE, S_SPLIT, S_LAUNCH} state_e;
  state_e state;

  localparam int unsigned IW = $clog2(NCL+1);

  logic [NSET-1:0][NCL-1:0] pending;   // clusters of each launched task still running
  logic [NSET-1:0]  armed;             // launch finished, waiting for completion
  logic [SW-1:0]    cur;               // slot of the launch in progress
  logic             have_free;
  logic [$clog2(NCL)-1:0] idx;
  logic [IW-1:0]    nsel, k;
  logic [SUB_W-1:0] q, r, next_first;
  task_t            tsk;

  logic [IW-1:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int i = 0; i < int'(NCL); i++) n_alloc += IW'(alloc_mask[i]);
  end

  // choose idle clusters for an allocation
  logic [NCL-1:0] pick;
  always_comb begin
    int n;
    n = 0;
    pick = '0;
    for (int i = 0; i < int'(NCL); i++)
      if (table_q[i] == R_IDLE && n < int'(alloc_copies)) begin
        pick[i] = 1'b1;
        n++;
      end
  end

  assign alloc_ready  = (state == S_IDLE);
  assign launch_ready = (state == S_IDLE) && have_free;

  // lowest free task slot
  always_comb begin
    have_free = 1'b0;
    launch_id = '0;
    for (int s = int'(NSET) - 1; s >= 0; s--)
      if (!armed[s] && pending[s] == '0) begin
        have_free = 1'b1;
        launch_id = SW'(s);
      end
  end

  always_comb begin
    for (int i = 0; i < int'(NCL); i++) busy_mask[i] = (table_q[i] != R_IDLE);
    cl_cfg_we    = cfg_we ? alloc_mask : '0;
    cl_cfg_addr  = cfg_addr;
    cl_cfg_wdata = cfg_wdata;
    cl_cmd       = tsk;
    cl_cmd.first = next_first;
    cl_cmd.count = q + ((SUB_W'(k) < r) ? SUB_W'(1) : SUB_W'(0));
    cl_cmd_valid = '0;
    if (state == S_LAUNCH && alloc_mask[idx]) cl_cmd_valid[idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NCL); i++) table_q[i] <= R_IDLE;
      state <= S_IDLE;
      alloc_mask <= '0; alloc_done <= 1'b0; task_done <= '0;
      pending <= '0; armed <= '0; cur <= '0; idx <= '0; nsel <= '0; k <= '0;
      q <= '0; r <= '0; next_first <= '0; tsk <= '0;
    end else begin
      alloc_done <= 1'b0;
      task_done  <= '0;
      // completion reports
      for (int i = 0; i < int'(NCL); i++)
        if (cl_done[i] && table_q[i] == R_RUNNING) table_q[i] <= R_IDLE;
      for (int s = 0; s < int'(NSET); s++) begin
        if (armed[s] && (pending[s] & ~cl_done) == '0) begin
          task_done[s] <= 1'b1;
          armed[s]     <= 1'b0;
        end
        pending[s] <= pending[s] & ~cl_done;
      end

      unique case (state)
        S_IDLE:
          if (alloc_valid) begin
            alloc_mask <= pick;
            alloc_done <= 1'b1;
            for (int i = 0; i < int'(NCL); i++)
              if (pick[i]) table_q[i] <= R_RESERVED;
          end else if (launch_valid && have_free) begin
            tsk   <= launch_task;
            cur   <= launch_id;
            nsel  <= n_alloc;
            state <= S_SPLIT;
          end
        S_SPLIT: begin
          if (nsel == '0) begin
            task_done[cur] <= 1'b1;
            state          <= S_IDLE;
          end else begin
            q <= tsk.count / SUB_W'(nsel);
            r <= tsk.count % SUB_W'(nsel);  // below nsel, fits IW bits
            next_first <= tsk.first;
            idx   <= '0;
            k     <= '0;
            state <= S_LAUNCH;
          end
        end
        S_LAUNCH: begin
          if (!alloc_mask[idx] || cl_cmd_ready[idx]) begin
            if (alloc_mask[idx]) begin
              table_q[idx] <= R_RUNNING;
              pending[cur][idx] <= 1'b1;
              next_first   <= next_first + cl_cmd.count;
              k            <= k + 1'b1;
            end
            if (int'(idx) == int'(NCL) - 1) begin
              state      <= S_IDLE;
              armed[cur] <= 1'b1;
              alloc_mask <= '0;
            end else idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
