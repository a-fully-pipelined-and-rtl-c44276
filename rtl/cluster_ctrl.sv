// cluster_ctrl: controller of a PE cluster
//
// The cluster's agent of the global accelerator manager (GAM). It forwards the GAM's
// configuration writes to the configuration unit (one register stage), accepts a task
// (a list of subtasks and the virtual start addresses of the arrays), starts the GDTU
// with it and enables the synchronization unit, monitors execution (counting the data
// blocks the DFG has processed and the cycles taken) and reports completion with a
// one-cycle `done` pulse, after which it accepts the next task.
//
// Handshake: a task is taken when cmd_valid && cmd_ready; cmd_ready is high while no
// task runs. The task is complete when the GDTU has written back every block, which
// implies every block has been computed. Counter widths are this design's choice.
module cluster_ctrl
  import fpca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // GAM side
  input  logic              cmd_valid,
  input  task_t             cmd,
  output logic              cmd_ready,
  output logic              done,
  input  logic              gam_cfg_we,
  input  logic [CFG_AW-1:0] gam_cfg_addr,
  input  logic [31:0]       gam_cfg_wdata,
  // configuration unit
  output logic              cfg_we,
  output logic [CFG_AW-1:0] cfg_addr,
  output logic [31:0]       cfg_wdata,
  // GDTU and synchronization unit
  output logic              gdtu_start,
  output task_t             gdtu_task,
  input  logic              gdtu_done,
  output logic [NUM_THR-1:0] sync_run,
  input  logic [NUM_THR-1:0] thr_start,
  // monitoring
  output logic [31:0]       blocks_computed,
  output logic [31:0]       task_cycles
);

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_RUN} state_e;
  state_e state;

  logic [31:0] n_started;
  always_comb begin
    n_started = '0;
    for (int t = 0; t < int'(NUM_THR); t++) n_started += 32'(thr_start[t]);
  end

  assign cmd_ready  = (state == S_IDLE);
  assign gdtu_start = (state == S_LAUNCH);
  assign sync_run   = (state == S_RUN) ? '1 : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      gdtu_task <= '0;
      done <= 1'b0;
      cfg_we <= 1'b0; cfg_addr <= '0; cfg_wdata <= '0;
      blocks_computed <= '0; task_cycles <= '0;
    end else begin
      cfg_we    <= gam_cfg_we;
      cfg_addr  <= gam_cfg_addr;
      cfg_wdata <= gam_cfg_wdata;
      done      <= 1'b0;
      unique case (state)
        S_IDLE:
          if (cmd_valid) begin
            gdtu_task       <= cmd;
            blocks_computed <= '0;
            task_cycles     <= '0;
            state           <= S_LAUNCH;
          end
        S_LAUNCH: state <= S_RUN;
        S_RUN: begin
          task_cycles <= task_cycles + 1'b1;
          blocks_computed <= blocks_computed + n_started;
          if (gdtu_done) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
