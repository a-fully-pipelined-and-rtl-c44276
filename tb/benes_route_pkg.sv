// benes_route_pkg: switch settings for the Benes network (testbench helper).
// route() computes the configuration bits that make output o carry input sel[o],
// with the classic looping algorithm: the two inputs of an input switch, and the two
// outputs of an output switch, must use different sub-networks; following these
// constraints around each cycle of the permutation splits it into an upper and a lower
// half-size permutation, which are routed recursively. The bits are appended to `cfg`
// in the order benes.sv expects (input column, upper, lower, output column).
//
// Stimulus, reference model and checks are this testbench's own; the behaviour it
// expects follows the FPCA architecture where that describes the block, and this
// design's stated choices (timing, formats, handshakes) elsewhere.
package benes_route_pkg;

  function automatic void route(input int n, input int sel[], ref bit cfg[$]);
    int h, inv[], in_set[], out_set[], up_sel[], lo_sel[];
    bit in_bits[], out_bits[];
    if (n == 2) begin
      cfg.push_back(sel[0] == 1);
      return;
    end
    h = n / 2;
    inv = new[n]; in_set = new[n]; out_set = new[n];
    up_sel = new[h]; lo_sel = new[h]; in_bits = new[h]; out_bits = new[h];
    for (int o = 0; o < n; o++) begin
      inv[sel[o]] = o;
      out_set[o] = -1;
      in_set[o] = -1;
    end
    for (int s = 0; s < h; s++) begin
      int o;
      if (out_set[2*s] != -1) continue;
      o = 2*s;
      forever begin
        int i, i2, o2;
        out_set[o] = 0;
        i = sel[o];
        in_set[i] = 0;
        i2 = i ^ 1;
        in_set[i2] = 1;
        o2 = inv[i2];
        out_set[o2] = 1;
        if (out_set[o2 ^ 1] != -1) break;
        o = o2 ^ 1;
      end
    end
    for (int k = 0; k < h; k++) begin
      in_bits[k]  = (in_set[2*k] == 1);
      out_bits[k] = (out_set[2*k] == 1);
    end
    for (int o = 0; o < n; o++) begin
      if (out_set[o] == 0) up_sel[o/2] = sel[o] / 2;
      else                 lo_sel[o/2] = sel[o] / 2;
    end
    for (int k = 0; k < h; k++) cfg.push_back(in_bits[k]);
    route(h, up_sel, cfg);
    route(h, lo_sel, cfg);
    for (int k = 0; k < h; k++) cfg.push_back(out_bits[k]);
  endfunction

endpackage
