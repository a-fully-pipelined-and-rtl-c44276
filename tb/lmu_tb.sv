// lmu_tb: self-checking testbench of the local memory unit (8x8-word blocks).
// Input LMU: the testbench, acting as GDTU, fills two blocks (the unit must then be
// full and refuse a third), starts it with a countdown and checks that the interior
// points of the block stream out one per cycle, starting exactly countdown + 2 cycles
// after start, and that the block is freed at the end; a second start then reads the
// second block while the first space is being refilled (double buffering).
// Output LMU: after its countdown it must store one input word per cycle at the
// pattern's addresses, commit the block, and return it on the GDTU read port.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
module lmu_tb;
  import fpca_pkg::*;

  localparam int BW = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  lmu_cfg_t icfg, ocfg;
  logic istart, ostart;
  logic [31:0] iout, oin, iout_unused_in, oout;
  logic gwe, gcommit, gre, grelease;
  logic [AG_W-1:0] gwaddr, graddr;
  logic [31:0] gwdata, grdata_i, grdata_o;
  logic iempty, ifull, ibusy, iready, idone, oempty, ofull, obusy, oready, odone;

  lmu #(.BLOCK_WORDS(BW)) u_in (
    .clk, .rst_n, .cfg(icfg), .start(istart), .ce_in(iout_unused_in), .ce_out(iout),
    .gd_we(gwe), .gd_waddr(gwaddr), .gd_wdata(gwdata), .gd_commit(gcommit),
    .gd_re(1'b0), .gd_raddr('0), .gd_rdata(grdata_i), .gd_release(1'b0),
    .empty(iempty), .full(ifull), .busy(ibusy), .ready(iready), .done(idone));

  lmu #(.BLOCK_WORDS(BW)) u_out (
    .clk, .rst_n, .cfg(ocfg), .start(ostart), .ce_in(oin), .ce_out(oout),
    .gd_we(1'b0), .gd_waddr('0), .gd_wdata('0), .gd_commit(1'b0),
    .gd_re(gre), .gd_raddr(graddr), .gd_rdata(grdata_o), .gd_release(grelease),
    .empty(oempty), .full(ofull), .busy(obusy), .ready(oready), .done(odone));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] val(int blk, int a);
    return 32'(blk * 1000 + a * 7 + 3);
  endfunction

  task automatic fill(int blk);
    for (int a = 0; a < BW; a++) begin
      @(negedge clk);
      gwe = 1'b1; gwaddr = AG_W'(a); gwdata = val(blk, a);
    end
    @(negedge clk);
    gwe = 1'b0; gcommit = 1'b1;
    @(negedge clk);
    gcommit = 1'b0;
  endtask

  // interior of an 8x8 block: rows 1..6, columns 1..6, address r*8+c
  task automatic stream(int blk, int K);
    @(negedge clk);
    icfg.countdown = CD_W'(K);
    check(iready, "input LMU ready before start");
    istart = 1'b1;
    @(negedge clk);
    istart = 1'b0;
    for (int m = 1; m < K + 2 + 36; m++) begin
      if (m >= K + 2) begin
        int n;
        n = m - K - 2;
        check(iout == val(blk, (1 + n / 6) * 8 + 1 + n % 6), $sformatf("stream blk %0d point %0d got %0d", blk, n, iout));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    {istart, ostart, gwe, gcommit, gre, grelease} = '0;
    gwaddr = '0; graddr = '0; gwdata = '0; oin = '0; iout_unused_in = '0;
    icfg = '0; ocfg = '0;
    icfg.enable = 1'b1; icfg.is_output = 1'b0; icfg.countdown = 8'd3;
    icfg.ag.base = 13'd9; icfg.ag.cnt[0] = 13'd6; icfg.ag.cnt[1] = 13'd6; icfg.ag.cnt[2] = 13'd1;
    icfg.ag.stride[0] = 13'd1; icfg.ag.stride[1] = 13'd8;
    ocfg = icfg; ocfg.is_output = 1'b1; ocfg.countdown = 8'd5;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(iempty && !iready, "input LMU empty after reset");
    check(!ofull && oready && oempty, "output LMU free after reset");
    fill(0);
    check(!iempty && !ifull, "one block held");
    fill(1);
    check(ifull, "two blocks make the input LMU full");
    stream(0, 3);
    check(!ifull && !iempty, "block 0 freed after streaming");
    fork
      stream(1, 0);
      fill(2);
    join
    stream(2, 1);
    check(iempty, "all blocks consumed");

    // output LMU
    @(negedge clk);
    ostart = 1'b1;
    @(negedge clk);
    ostart = 1'b0;
    for (int m = 1; m <= 5 + 36 + 1; m++) begin
      if (m >= 6 && m < 6 + 36) oin = 32'(5000 + m - 6);
      else oin = 32'hDEAD_BEEF;
      @(negedge clk);
    end
    check(!oempty && !obusy, "output LMU committed its block");
    for (int n = 0; n < 36; n++) begin
      graddr = AG_W'((1 + n / 6) * 8 + 1 + n % 6);
      gre = 1'b1;
      @(negedge clk);
      gre = 1'b0;
      check(grdata_o == 32'(5000 + n), $sformatf("stored point %0d got %0d", n, grdata_o));
    end
    grelease = 1'b1;
    @(negedge clk);
    grelease = 1'b0;
    check(oempty, "write-back released the output block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
