// pdbg_checker: stimulus and checking for an end-to-end run of pdbg_top,
// shared by the reduced-size and the full-size testbench. It drives the
// DUT's signal, configuration and PLC ports (through plc_model), checks every
// output every clock against values worked out from the stimulus alone, and
// prints the TB_RESULT line. Steps:
//   1. after reset: PLC pins quiet, every signal passes through unchanged;
//   2. routing A in bypass (ratio 1): M random signals observed, M others
//      overridden by random PLC words;
//   3. routing B at ratio R_MAX: new random sets; the PLC counts transitions
//      on the observed signals over a window and the counts must equal the
//      transitions the checker drove.
// Mechanisms counted (each must occur at least once): bypass frames, R_MAX:1
// frames, lane slices wrapping round the bus, overrides applied, pass-through,
// ratio switch, reconfiguration, transition counts.
module pdbg_checker #(
  parameter int N     = 230,
  parameter int M     = 23,
  parameter int X     = 23,
  parameter int R_MAX = 4,
  localparam int K  = (N + X - 1) / X,
  localparam int AW = pdbg_pkg::cfg_aw(K, X, M),
  localparam int RW = pdbg_pkg::clog2_min1(R_MAX + 1)
) (
  input  logic                    clk,
  output logic                    rst_n,
  output logic [N-1:0]            sig,
  input  logic [N-1:0]            sig_out,
  output logic                    cfg_we,
  output logic [AW-1:0]           cfg_addr,
  output logic [31:0]             cfg_wdata,
  input  logic                    plc_ce,
  input  logic [M-1:0][R_MAX-1:0] plc_obs,
  output logic [M-1:0][R_MAX-1:0] plc_val,
  output logic [M-1:0][R_MAX-1:0] plc_en
);
  import hc_route_pkg::*;

  localparam int GAW = pdbg_pkg::clog2_min1(K);
  localparam int WAW = pdbg_pkg::cfg_word_aw(X, M);
  localparam int HB  = pdbg_pkg::hc_cfg_bits(X, M);
  localparam int NBO = pdbg_pkg::obs_cfg_bits(X, M);
  localparam int NBC = pdbg_pkg::ctrl_cfg_bits(X, M);

  // ---------------------------------------------------------------- PLC
  logic [RW-1:0] plc_ratio;
  logic count_en, count_clr;
  int unsigned counts [M];
  logic [M-1:0][R_MAX-1:0] force_val, force_en;

  plc_model #(.M(M), .R_MAX(R_MAX), .RW(RW)) u_plc (
    .clk_i(clk), .plc_ce_i(plc_ce), .ratio_i(plc_ratio), .obs_i(plc_obs),
    .count_en_i(count_en), .clear_i(count_clr), .count_o(counts),
    .force_val_i(force_val), .force_en_i(force_en),
    .ctrl_val_o(plc_val), .ctrl_en_o(plc_en));

  int checks = 0, failures = 0;
  int n_bypass = 0, n_ratio = 0, n_wrap = 0, n_override = 0, n_pass = 0;
  int n_switch = 0, n_reconf = 0, n_trans = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- config
  task automatic cfg_write(int space, int g, int w, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1;
    cfg_addr = {2'(space), GAW'(g), WAW'(w)};
    cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic cfg_group(int space, int g, bit [1023:0] v, int nb);
    for (int w = 0; w < pdbg_pkg::cfg_words(nb); w++) cfg_write(space, g, w, v[w*32 +: 32]);
  endtask

  // routing state
  int obs_lane_sig [M];    // signal index seen on each observe lane, -1 none
  int ctrl_lane_of [N];    // control lane driving each signal, -1 none
  bit used_obs [K], used_ctrl [K];

  // Pick cnt distinct random signals, disjoint from 'avoid'.
  task automatic pick(output bit chosen [N], input bit avoid [N], input int cnt);
    int got = 0, idx, g0;
    foreach (chosen[i]) chosen[i] = 0;
    // a few from one group, so that a group owns a slice of several lanes
    g0 = $urandom_range(0, N / X - 1);
    for (int i = 0; i < X && got < cnt / 3; i++)
      if (!avoid[g0 * X + i] && $urandom_range(0, 1) == 0) begin chosen[g0 * X + i] = 1; got++; end
    while (got < cnt) begin
      idx = $urandom_range(0, N - 1);
      if (!chosen[idx] && !avoid[idx]) begin chosen[idx] = 1; got++; end
    end
  endtask

  // Program one direction: release old groups, then give each group with
  // chosen signals a consecutive slice starting at a random base lane.
  task automatic route(int space, bit chosen [N]);
    bit [1023:0] v;
    hc_cfg_t c;
    bit [MAXM-1:0] lm;
    sel_t sel;
    int base, used, cnt, r;
    for (int g = 0; g < K; g++) begin
      if (space == 0 && used_obs[g])  begin cfg_group(0, g, '0, NBO); used_obs[g] = 0; end
      if (space == 1 && used_ctrl[g]) begin cfg_group(1, g, '0, NBC); used_ctrl[g] = 0; end
    end
    if (space == 0) foreach (obs_lane_sig[q]) obs_lane_sig[q] = -1;
    else            foreach (ctrl_lane_of[i]) ctrl_lane_of[i] = -1;
    // Start the slices so that the largest one wraps from lane M-1 to lane 0.
    begin
      int best = 0, pre = 0, acc = 0, c2;
      for (int g = 0; g < K; g++) begin
        c2 = 0;
        for (int i = 0; i < X; i++) if (g * X + i < N) c2 += int'(chosen[g * X + i]);
        if (c2 > best) begin best = c2; pre = acc; end
        acc += c2;
      end
      base = ((M - 1 - pre) % M + M) % M;
    end
    used = 0;
    for (int g = 0; g < K; g++) begin
      sel = '0;
      for (int i = 0; i < X; i++) if (g * X + i < N) sel[i] = chosen[g * X + i];
      cnt = popcount(sel, X);
      if (cnt == 0) continue;
      if ((base + used) % M + cnt > M) n_wrap++;
      v = '0;
      if (space == 0) c = hc_fwd_cfg(X, M, sel, (base + used) % M);
      else            c = hc_rev_cfg(X, M, sel, (base + used) % M);
      lm = lane_mask(M, (base + used) % M, cnt);
      v[HB-1:0] = c[HB-1:0];
      v[HB +: M] = lm[M-1:0];
      if (space == 1) v[HB + M +: X] = sel[X-1:0];
      cfg_group(space, g, v, space == 0 ? NBO : NBC);
      if (space == 0) used_obs[g] = 1; else used_ctrl[g] = 1;
      r = 0;
      for (int i = 0; i < X; i++) if (sel[i]) begin
        if (space == 0) obs_lane_sig[(base + used + r) % M] = g * X + i;
        else            ctrl_lane_of[g * X + i] = (base + used + r) % M;
        r++;
      end
      used += cnt;
    end
  endtask

  // ---------------------------------------------------------------- checking
  // Per-clock model of what must be seen. Cycle n runs from one rising edge
  // to the next; stimulus is applied at the falling edge inside it.
  logic [N-1:0] sh [16];           // signal values driven in cycle n
  logic [M-1:0] cb_val [16], cb_en [16];
  bit           cb_ok [16];        // control bus known for cycle n
  int  n = 0;
  int  ratio = 1;
  int  settle = 0;                 // cycles to skip after a ratio change
  int  last_ce = -1;
  bit  checking = 0;
  int  toggles [M];
  bit  toggling = 0;

  task automatic cycle();
    int q, s;
    logic expv;
    @(negedge clk);
    // observe path: frame in the PLC pins
    if (checking && settle == 0 && plc_ce) begin
      if (last_ce >= 0) chk(n - last_ce == ratio, "PLC frame period");
      for (s = 0; s < ratio; s++)
        for (q = 0; q < M; q++)
          if (obs_lane_sig[q] >= 0)
            chk(plc_obs[q][s] == sh[(n - ratio + s - 1) & 15][obs_lane_sig[q]], "observed sample");
          else
            chk(plc_obs[q][s] == 1'b0, "unused lane quiet");
      if (ratio == 1) n_bypass++; else n_ratio++;
    end
    if (plc_ce) last_ce = n;
    // control path: every signal, every cycle
    if (checking && settle == 0 && cb_ok[(n - 1) & 15])
      for (int i = 0; i < N; i++) begin
        q = ctrl_lane_of[i];
        expv = sig[i];
        if (q >= 0 && cb_en[(n - 1) & 15][q]) begin expv = cb_val[(n - 1) & 15][q]; n_override++; end
        else n_pass++;
        chk(sig_out[i] == expv, "signal after override stage");
      end
    // new stimulus
    for (int i = 0; i < N; i++)
      if (toggling && $urandom_range(0, 2) == 0) sig[i] = ~sig[i];
    if (toggling)
      for (q = 0; q < M; q++)
        if (obs_lane_sig[q] >= 0 && sig[obs_lane_sig[q]] != sh[(n - 1) & 15][obs_lane_sig[q]])
          toggles[q]++;
    sh[n & 15] = sig;
    for (q = 0; q < M; q++) begin
      force_val[q] = R_MAX'($urandom);
      force_en[q]  = R_MAX'($urandom);
    end
    // the PLC word presented now is loaded at the end of this cycle
    cb_ok[(n + 1) & 15] = 0;
    if (plc_ce)
      for (s = 0; s < ratio; s++) begin
        cb_val[(n + 1 + s) & 15] = '0;
        cb_en[(n + 1 + s) & 15]  = '0;
        for (q = 0; q < M; q++) begin
          cb_val[(n + 1 + s) & 15][q] = plc_val[q][s];
          cb_en[(n + 1 + s) & 15][q]  = plc_en[q][s];
        end
        cb_ok[(n + 1 + s) & 15] = 1;
      end
    if (settle > 0) settle--;
    n++;
  endtask

  task automatic set_ratio(int r);
    cfg_write(2, 0, 0, 32'(r));
    ratio = r;
    plc_ratio = RW'(r);
    settle = 2 * R_MAX + 4;
    last_ce = -1;
    n_switch++;
  endtask

  initial begin
    bit ch_o [N], ch_c [N], none [N];
    rst_n = 0; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    sig = '0; count_en = 0; count_clr = 0; plc_ratio = RW'(1);
    force_val = '0; force_en = '0;
    foreach (none[i]) none[i] = 0;
    foreach (used_obs[g]) begin used_obs[g] = 0; used_ctrl[g] = 0; end
    foreach (obs_lane_sig[q]) obs_lane_sig[q] = -1;
    foreach (ctrl_lane_of[i]) ctrl_lane_of[i] = -1;
    foreach (cb_ok[i]) cb_ok[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // 1. quiet after reset, free-running signals
    toggling = 1; checking = 1;
    repeat (20) cycle();
    // 2. routing A, bypass
    checking = 0;
    pick(ch_o, none, M);
    route(0, ch_o);
    pick(ch_c, ch_o, M);
    route(1, ch_c);
    n_reconf++;
    checking = 1; settle = 2 * R_MAX + 4;
    repeat (60) cycle();
    // 3. routing B, ratio R_MAX, transition counting window
    checking = 0;
    pick(ch_o, none, M);
    route(0, ch_o);
    pick(ch_c, ch_o, M);
    route(1, ch_c);
    n_reconf++;
    set_ratio(R_MAX);
    checking = 1;
    toggling = 0;
    repeat (4 * R_MAX + 8) cycle();
    count_clr = 1; cycle(); count_clr = 0;
    foreach (toggles[q]) toggles[q] = 0;
    count_en = 1;
    toggling = 1;
    repeat (25 * R_MAX) cycle();
    toggling = 0;
    repeat (4 * R_MAX + 8) cycle();
    count_en = 0;
    cycle();
    for (int q = 0; q < M; q++) if (obs_lane_sig[q] >= 0) begin
      chk(counts[q] == toggles[q], "PLC transition count");
      n_trans += toggles[q];
    end
    $display("frames bypass=%0d ratio%0d=%0d wraps=%0d overrides=%0d pass=%0d switches=%0d reconf=%0d transitions=%0d",
             n_bypass, R_MAX, n_ratio, n_wrap, n_override, n_pass, n_switch, n_reconf, n_trans);
    chk(n_bypass > 0,   "bypass mode exercised");
    chk(n_ratio > 0,    "ratio mode exercised");
    chk(n_wrap > 0,     "wrapping slice exercised");
    chk(n_override > 0, "override exercised");
    chk(n_pass > 0,     "pass-through exercised");
    chk(n_switch > 0,   "ratio switch exercised");
    chk(n_reconf > 1,   "reconfiguration exercised");
    chk(n_trans > 0,    "transition counting exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
