// tb_access_network: self-checking test of the access network through its
// configuration address decode, at a reduced size (6 groups of 5 signals,
// 8 lanes). Observe and control routings are programmed by address
// {space, group, word}, together with stray writes to the other spaces, which
// must change nothing. Each trial then checks, every clock, that the observe
// bus carries the chosen signals one clock after they were driven, and that
// the chosen controllable signals take the control-bus value of one clock
// earlier where its enable was set, all other signals passing through.
module tb_access_network;
  import hc_route_pkg::*;

  localparam int K = 6, X = 5, M = 8;
  localparam int HB  = pdbg_pkg::hc_cfg_bits(X, M);
  localparam int NBO = pdbg_pkg::obs_cfg_bits(X, M);
  localparam int NBC = pdbg_pkg::ctrl_cfg_bits(X, M);
  localparam int GAW = pdbg_pkg::clog2_min1(K);
  localparam int WAW = pdbg_pkg::cfg_word_aw(X, M);
  localparam int AW  = pdbg_pkg::cfg_aw(K, X, M);

  logic clk = 0, rst_n = 0;
  logic [K-1:0][X-1:0] sig, sig_out;
  logic [M-1:0] obs_bus, cval = '0, cen = '0;
  logic cfg_we = 0;
  logic [AW-1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;

  access_network #(.K(K), .X(X), .M(M)) dut (
    .clk_i(clk), .rst_ni(rst_n), .sig_i(sig), .sig_o(sig_out), .obs_bus_o(obs_bus),
    .ctrl_val_i(cval), .ctrl_en_i(cen),
    .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int space, int g, int w, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = {2'(space), GAW'(g), WAW'(w)}; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic wr_group(int space, int g, bit [1023:0] v, int nb);
    for (int w = 0; w < pdbg_pkg::cfg_words(nb); w++) begin
      wr(space, g, w, v[w*32 +: 32]);
      wr(2 + (w % 2), g, w, 32'hFFFF_FFFF);   // stray write to another space
    end
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  int obs_src [M];       // flat signal index on each observe lane, -1 none
  int ctl_lane [K*X];    // control lane of each signal, -1 none

  task automatic route(int space);
    bit [1023:0] v;
    hc_cfg_t c;
    bit [MAXM-1:0] lm;
    sel_t sel;
    int total = 0, base, cnt, r;
    base = $urandom_range(0, M - 1);
    for (int g = 0; g < K; g++) wr_group(space, g, '0, space == 0 ? NBO : NBC);
    for (int g = 0; g < K; g++) begin
      sel = '0;
      for (int i = 0; i < X; i++)
        if (total < M && $urandom_range(0, 2) == 0) begin sel[i] = 1; total++; end
      cnt = popcount(sel, X);
      v = '0;
      c = (space == 0) ? hc_fwd_cfg(X, M, sel, (base + total - cnt) % M)
                       : hc_rev_cfg(X, M, sel, (base + total - cnt) % M);
      lm = lane_mask(M, (base + total - cnt) % M, cnt);
      v[HB-1:0] = c[HB-1:0];
      v[HB +: M] = lm[M-1:0];
      if (space == 1) v[HB + M +: X] = sel[X-1:0];
      wr_group(space, g, v, space == 0 ? NBO : NBC);
      r = 0;
      for (int i = 0; i < X; i++) if (sel[i]) begin
        if (space == 0) obs_src[(base + total - cnt + r) % M] = g * X + i;
        else            ctl_lane[g * X + i] = (base + total - cnt + r) % M;
        r++;
      end
    end
  endtask

  initial begin
    logic [K*X-1:0] prev;
    logic [M-1:0] pv, pe;
    logic e;
    sig = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      foreach (obs_src[q]) obs_src[q] = -1;
      foreach (ctl_lane[i]) ctl_lane[i] = -1;
      route(0);
      route(1);
      @(negedge clk);
      for (int t = 0; t < 12; t++) begin
        for (int g = 0; g < K; g++) sig[g] = X'($urandom);
        cval = M'($urandom); cen = M'($urandom);
        pv = cval; pe = cen; prev = sig;
        @(negedge clk);
        for (int q = 0; q < M; q++)
          chk(obs_bus[q] == (obs_src[q] < 0 ? 1'b0 : prev[obs_src[q]]), "observe lane");
        for (int i = 0; i < K * X; i++) begin
          e = sig[i / X][i % X];
          if (ctl_lane[i] >= 0 && pe[ctl_lane[i]]) e = pv[ctl_lane[i]];
          chk(sig_out[i / X][i % X] == e, "controlled signal");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
