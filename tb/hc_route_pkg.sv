// hc_route_pkg: routing software for the debug access network, used by the
// testbenches. Given which signals of one IP block are wanted (sel) and where
// their slice of the debug bus starts (off), it computes the routing bits of
// the forward hyper-concentrator (observe) and of its mirror (control), in the
// layout of pdbg_pkg. It follows the compaction rule described in
// hyperconcentrator.sv: a selected input i with z unselected inputs below it
// moves down by z, by the binary digits of z from the least significant.
// Sizes up to MAXX inputs and MAXM bus lanes are supported.
package hc_route_pkg;

  localparam int MAXX = 64;
  localparam int MAXM = 64;
  localparam int MAXB = 8 * MAXX + 8 * MAXM;

  typedef bit [MAXB-1:0] hc_cfg_t;
  typedef bit [MAXX-1:0] sel_t;

  function automatic hc_cfg_t hc_fwd_cfg(int x, int m, sel_t sel, int off);
    hc_cfg_t cfg = '0;
    int cw = pdbg_pkg::hc_cw(x);
    int cs = pdbg_pkg::hc_cs(x);
    int rs = pdbg_pkg::hc_rs(m);
    int z, pos;
    int unsel = 0;
    for (int i = 0; i < x; i++) begin
      if (sel[i]) begin
        z = unsel;
        pos = i;
        for (int s = 0; s < cs; s++) begin
          if (z[s]) begin
            pos = pos - (1 << s);
            cfg[s*cw + pos] = 1'b1;
          end
        end
      end else begin
        unsel++;
      end
    end
    for (int s = 0; s < rs; s++)
      for (int j = 0; j < m; j++)
        cfg[cs*cw + s*m + j] = off[s];
    return cfg;
  endfunction

  function automatic hc_cfg_t hc_rev_cfg(int x, int m, sel_t sel, int off);
    hc_cfg_t cfg = '0;
    int cw = pdbg_pkg::hc_cw(x);
    int cs = pdbg_pkg::hc_cs(x);
    int rs = pdbg_pkg::hc_rs(m);
    int z, pos;
    int unsel = 0;
    for (int i = 0; i < x; i++) begin
      if (sel[i]) begin
        z = unsel;
        pos = i - z;              // compacted position
        for (int s = cs - 1; s >= 0; s--) begin
          if (z[s]) begin
            pos = pos + (1 << s);
            cfg[s*cw + pos] = 1'b1;
          end
        end
      end else begin
        unsel++;
      end
    end
    for (int s = 0; s < rs; s++)
      for (int j = 0; j < m; j++)
        cfg[cs*cw + s*m + j] = off[s];
    return cfg;
  endfunction

  // Bus-lane select mask for a slice of cnt lanes starting at off (cyclic).
  function automatic bit [MAXM-1:0] lane_mask(int m, int off, int cnt);
    bit [MAXM-1:0] r = '0;
    for (int q = 0; q < cnt; q++) r[(off + q) % m] = 1'b1;
    return r;
  endfunction

  function automatic int popcount(sel_t v, int x);
    int c = 0;
    for (int i = 0; i < x; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
