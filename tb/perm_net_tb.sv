// perm_net_tb: self-checking testbench of the permutation network (and benes).
// For many random permutations of the 32 ports it computes the switch settings with
// the looping algorithm, streams a new random word into every input each cycle and
// checks that every output carries the word of its assigned input from exactly two
// cycles earlier (full connectivity, one word per cycle, 2-cycle latency).
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module perm_net_tb;
  import fpca_pkg::*;
  import benes_route_pkg::*;

  localparam int N = NET_PORTS;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [benes_bits(N)-1:0] cfg;
  logic [N-1:0][31:0] din, dout;
  logic [N-1:0][31:0] hist [4];
  int checks = 0, failures = 0;

  perm_net dut (.clk, .cfg, .din, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel[];
    bit q[$];
    sel = new[N];
    din = '0;
    for (int p = 0; p < 60; p++) begin
      // random permutation (identity and reversal first)
      for (int o = 0; o < N; o++) sel[o] = (p == 1) ? N - 1 - o : o;
      if (p > 1)
        for (int o = N - 1; o > 0; o--) begin
          int j, t;
          j = $urandom_range(o, 0);
          t = sel[o]; sel[o] = sel[j]; sel[j] = t;
        end
      q.delete();
      route(N, sel, q);
      if (q.size() != int'(benes_bits(N))) begin
        failures++;
        $display("route produced %0d bits", q.size());
      end
      @(negedge clk);
      for (int b = 0; b < int'(benes_bits(N)); b++) cfg[b] = q[b];
      for (int t = 0; t < 12; t++) begin
        if (t >= 4)
          for (int o = 0; o < N; o++) begin
            checks++;
            if (dout[o] !== hist[2][sel[o]]) begin
              failures++;
              if (failures < 10) $display("perm %0d out %0d: got %h want %h", p, o, dout[o], hist[2][sel[o]]);
            end
          end
        for (int i = 0; i < N; i++) din[i] = $urandom();
        hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = din;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
