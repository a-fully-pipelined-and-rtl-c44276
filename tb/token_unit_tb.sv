// token_unit_tb: self-checking testbench of the LMU FIFO controller (double buffer).
// Applies random produce/consume pulses that respect empty/full and compares level,
// empty, full and both slot pointers with a reference counter model; checks that two
// blocks fit and a third does not, and that simultaneous produce and consume keep
// the level.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module token_unit_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, produce, consume, empty, full;
  logic [0:0] wr_slot, rd_slot;
  int checks = 0, failures = 0;
  int level, ws, rs, saw_full, saw_both;

  token_unit #(.DEPTH(2)) dut (.clk, .rst_n, .produce, .consume, .wr_slot, .rd_slot, .empty, .full);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; produce = 1'b0; consume = 1'b0;
    level = 0; ws = 0; rs = 0; saw_full = 0; saw_both = 0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (empty !== (level == 0) || full !== (level == 2) || int'(wr_slot) != ws || int'(rd_slot) != rs) begin
        failures++;
        if (failures < 10) $display("t=%0d level %0d empty %b full %b ws %0d rs %0d", t, level, empty, full, wr_slot, rd_slot);
      end
      if (full) saw_full++;
      produce = !full && ($urandom_range(2, 0) != 0);
      consume = !empty && ($urandom_range(2, 0) != 0);
      if (t < 4) begin produce = (t < 2); consume = 1'b0; end  // fill both spaces
      if (produce && consume) saw_both++;
      level += int'(produce) - int'(consume);
      if (produce) ws ^= 1;
      if (consume) rs ^= 1;
    end
    checks++;
    if (saw_full == 0 || saw_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
