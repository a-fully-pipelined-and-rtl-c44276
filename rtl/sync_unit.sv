// sync_unit: synchronization unit, starts all LMUs of a DFG in the same cycle
//
// Inside a running DFG nothing carries a valid bit: CEs, register chains and the
// permutation network just transform their inputs every cycle with a fixed delay. The
// only synchronisation point is the start of a data block, and this unit provides it.
// For each thread (one DFG mapped into the cluster) it checks that every LMU of that
// thread reports `ready` (idle, and not empty if it loads, not full if it stores); then
// it pulses the thread's start for one cycle, which every LMU of the thread receives.
// Threads are handled independently, so two DFGs can share a cluster.
//
// Interface: lmu_thread/lmu_en tell which LMUs belong to which thread (from the LMU
// configuration); `run` gates each thread (set by the cluster controller while a task
// is active). Timing: start rises the cycle after the condition holds and lasts one
// cycle; the LMUs are busy from the cycle after that, so a thread cannot start twice
// for one block. One flip-flop per thread.
//
// Starting all LMUs of a DFG together, per thread, on no-empty/no-full follows the FPCA
// architecture; the idle condition, the number of threads and the one-cycle pulse
// are this design's choices.
module sync_unit
  import fpca_pkg::*;
#(
  parameter int unsigned NLMU = NUM_LMU,
  parameter int unsigned NTHR = NUM_THR
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NTHR-1:0]            run,
  input  logic [NLMU-1:0]            lmu_en,
  input  logic [NLMU-1:0][THR_W-1:0] lmu_thread,
  input  logic [NLMU-1:0]            lmu_ready,
  output logic [NTHR-1:0]            thr_start,   // one pulse per started block
  output logic [NLMU-1:0]            lmu_start
);

  logic [NTHR-1:0] go;

  always_comb begin
    for (int t = 0; t < int'(NTHR); t++) begin
      logic any, all;
      any = 1'b0;
      all = 1'b1;
      for (int l = 0; l < int'(NLMU); l++)
        if (lmu_en[l] && int'(lmu_thread[l]) == t) begin
          any = 1'b1;
          all = all && lmu_ready[l];
        end
      go[t] = run[t] && any && all && !thr_start[t];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) thr_start <= '0;
    else        thr_start <= go;
  end

  always_comb begin
    for (int l = 0; l < int'(NLMU); l++)
      lmu_start[l] = lmu_en[l] && thr_start[lmu_thread[l]];
  end

endmodule
