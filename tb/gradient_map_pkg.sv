// gradient_map_pkg: the GRADIENT kernel compiled by hand onto one PE cluster
// (testbench helper).
//
// Kernel, for every interior point (j, k) of a side x side data block x:
//   y[j][k] = (c-d)^2 + (c-l)^2 + (c-u)^2 + (c-r)^2,  c = x[j][k], d = x[j-1][k],
//             l = x[j][k-1], u = x[j+1][k], r = x[j][k+1]
// Border points of y are not written. Mapping (each load and the store get an LMU):
//   LMU0 d, LMU1 l, LMU2 c, LMU3 u, LMU4 r (inputs, one block broadcast to all five by
//   GDTU channel 0), LMU5 y (output, written back by channel 1). All walk cnt
//   {side-2, side-2, 1}, stride {1, side, 0} from their own base.
//   CE0 = (c-d)^2           CE3 = (c-r)^2
//   CE1 = CE0 + (c-l)^2     (P(n-1) link)
//   CE2 = CE1 + (c-u)^2 + CE3   (P(n-1) link, C from the network)
//   c is fanned out by register chain 0 with taps of delay 0, 2, 4 and 8.
// Schedule (LMU start = cycle 0, LMU out at K+2+n, network 2, CE 4, chain taps):
//   c reaches the chain at 4+n, so CE0 sees c at 6+n, CE3 at 8+n, CE1 at 10+n,
//   CE2 at 14+n; countdowns d 2, r 4, l 6, u 10 align the other operands; CE2's
//   result reaches LMU5 at 20+n, so the output countdown is 19.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
package gradient_map_pkg;
  import fpca_pkg::*;
  import benes_route_pkg::*;

  function automatic lmu_cfg_t lmu_in(int base, int side, int k);
    lmu_cfg_t c;
    c = '0;
    c.enable = 1'b1;
    c.countdown = CD_W'(k);
    c.ag.base = AG_W'(base);
    c.ag.cnt[0] = AG_W'(side - 2); c.ag.cnt[1] = AG_W'(side - 2); c.ag.cnt[2] = AG_W'(1);
    c.ag.stride[0] = AG_W'(1); c.ag.stride[1] = AG_W'(side); c.ag.stride[2] = '0;
    return c;
  endfunction

  // side: block edge (block = side*side words); va_stride: distance between blocks
  function automatic cluster_cfg_t gradient_cfg(int side);
    cluster_cfg_t g;
    int sel[];
    bit used[NET_PORTS];
    bit q[$];
    int nxt;
    g = '0;
    for (int i = 0; i < 4; i++) begin
      g.ce[i].pre = PRE_SUB;
      g.ce[i].mul = MUL_SQUARE;
    end
    g.ce[1].use_p = 1'b1;
    g.ce[2].use_p = 1'b1;
    g.ce[2].use_c = 1'b1;
    g.rc[0].seg_len[0] = 2'd0;
    g.rc[0].seg_len[1] = 2'd2;
    g.rc[0].seg_len[2] = 2'd2;
    g.rc[0].seg_len[3] = 2'd3;
    g.rc[0].seg_len[4] = 2'd1;
    g.rc[0].seg_len[5] = 2'd0;
    g.lmu[0] = lmu_in(1,            side, 2);
    g.lmu[1] = lmu_in(side,         side, 6);
    g.lmu[2] = lmu_in(side + 1,     side, 0);
    g.lmu[3] = lmu_in(2 * side + 1, side, 10);
    g.lmu[4] = lmu_in(side + 2,     side, 4);
    g.lmu[5] = lmu_in(side + 1,     side, 19);
    g.lmu[5].is_output = 1'b1;
    // network: sel[sink] = source
    sel = new[NET_PORTS];
    for (int o = 0; o < int'(NET_PORTS); o++) sel[o] = -1;
    sel[0]  = 12;  // CE0.A <- chain out0 (c)
    sel[3]  = 6;   // CE0.D <- LMU0 (d)
    sel[4]  = 14;  // CE1.A <- chain out2
    sel[7]  = 7;   // CE1.D <- LMU1 (l)
    sel[8]  = 16;  // CE2.A <- chain out4
    sel[10] = 3;   // CE2.C <- CE3.P
    sel[11] = 9;   // CE2.D <- LMU3 (u)
    sel[12] = 13;  // CE3.A <- chain out1
    sel[15] = 10;  // CE3.D <- LMU4 (r)
    sel[29] = 2;   // LMU5 in <- CE2.P
    sel[30] = 8;   // chain 0 in <- LMU2 (c)
    foreach (sel[o]) if (sel[o] >= 0) used[sel[o]] = 1'b1;
    nxt = 0;
    for (int o = 0; o < int'(NET_PORTS); o++)
      if (sel[o] < 0) begin
        while (used[nxt]) nxt++;
        sel[o] = nxt;
        used[nxt] = 1'b1;
      end
    route(NET_PORTS, sel, q);
    for (int b = 0; b < int'(PERM_BITS); b++) g.perm[b] = q[b];
    // GDTU: channel 0 prefetches into LMU0..4, channel 1 writes LMU5 back
    g.ch[0].enable = 1'b1;
    g.ch[0].lmu_mask = 6'b011111;
    g.ch[0].block_words = AG_W'(side * side);
    g.ch[0].va_stride = 32'(side * side);
    g.ch[1].enable = 1'b1;
    g.ch[1].to_dram = 1'b1;
    g.ch[1].lmu_mask = 6'b100000;
    g.ch[1].block_words = AG_W'(side * side);
    g.ch[1].va_stride = 32'(side * side);
    return g;
  endfunction

  // 32-bit configuration word w of a configuration
  function automatic logic [31:0] cfg_word(cluster_cfg_t g, int w);
    logic [CFG_WORDS*32-1:0] bits;
    bits = '0;
    bits[CFG_BITS-1:0] = g;
    return bits[w*32 +: 32];
  endfunction

  function automatic logic [31:0] grad_point(logic [31:0] c, logic [31:0] d, logic [31:0] l,
                                             logic [31:0] u, logic [31:0] r);
    return (c - d) * (c - d) + (c - l) * (c - l) + (c - u) * (c - u) + (c - r) * (c - r);
  endfunction

endpackage
