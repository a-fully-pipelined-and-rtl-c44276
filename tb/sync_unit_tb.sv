// sync_unit_tb: self-checking testbench of the synchronization unit.
// Six LMUs are split between two threads (one LMU disabled). Random ready patterns are
// applied; a reference model predicts each thread's start pulse (one cycle after all of
// its enabled LMUs are ready while it runs, never in two consecutive cycles) and
// which LMUs receive it. Both threads must start at least once, and a thread whose
// `run` is low must never start.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module sync_unit_tb;
  import fpca_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic [1:0] run, thr_start;
  logic [5:0] en, ready, lstart;
  logic [5:0][0:0] thr;

  sync_unit dut (.clk, .rst_n, .run, .lmu_en(en), .lmu_thread(thr), .lmu_ready(ready),
                 .thr_start, .lmu_start(lstart));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_q;
    int starts [2];
    starts = '{0, 0};
    rst_n = 1'b0; run = '0; en = 6'b101111; ready = '0;
    thr[0] = 1'b0; thr[1] = 1'b0; thr[2] = 1'b1; thr[3] = 1'b1; thr[4] = 1'b1; thr[5] = 1'b0;
    exp_q = '0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      logic [1:0] go;
      @(negedge clk);
      checks++;
      if (thr_start !== exp_q) begin
        failures++;
        if (failures < 10) $display("t=%0d thr_start %b want %b", t, thr_start, exp_q);
      end
      for (int l = 0; l < 6; l++) begin
        checks++;
        if (lstart[l] !== (en[l] && exp_q[thr[l]])) failures++;
      end
      for (int k = 0; k < 2; k++) if (exp_q[k]) starts[k]++;
      run = (t < 2500) ? 2'b11 : 2'b10;
      for (int l = 0; l < 6; l++) ready[l] = ($urandom_range(3, 0) != 0);
      go[0] = run[0] && ready[0] && ready[1] && ready[5] && !exp_q[0];
      go[1] = run[1] && ready[2] && ready[3] && !exp_q[1];  // LMU 4 is disabled
      exp_q = go;
    end
    checks++;
    if (starts[0] == 0 || starts[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
