// tb_control_network: self-checking test of the control access network at a
// reduced size (6 groups of 5 signals, 8-lane bus). Each trial picks a random
// set of at most M controllable signals, gives each group a slice of lanes at
// a random (wrapping) offset and programs routing bits, Input Select and
// target mask. Random override values/enables are driven on the bus and random
// values on the signals. Expected, one clock after the bus was driven: the
// r-th chosen signal of group g shows the value of lane (off_g + r) mod M if
// that lane's enable was set, else its own input; every other signal passes
// through unchanged.
module tb_control_network;
  import hc_route_pkg::*;

  localparam int K = 6, X = 5, M = 8;
  localparam int HB  = pdbg_pkg::hc_cfg_bits(X, M);
  localparam int NB  = pdbg_pkg::ctrl_cfg_bits(X, M);
  localparam int NW  = pdbg_pkg::cfg_words(NB);
  localparam int GAW = pdbg_pkg::clog2_min1(K);
  localparam int WAW = pdbg_pkg::cfg_word_aw(X, M);

  logic clk = 0, rst_n = 0;
  logic [K-1:0][X-1:0] sig, sig_out;
  logic [M-1:0] bval = '0, ben = '0;
  logic cfg_we = 0;
  logic [GAW-1:0] cfg_group = '0;
  logic [WAW-1:0] cfg_word = '0;
  logic [31:0] cfg_wdata = '0;

  control_network #(.K(K), .X(X), .M(M)) dut (
    .clk_i(clk), .rst_ni(rst_n), .bus_val_i(bval), .bus_en_i(ben),
    .sig_i(sig), .sig_o(sig_out), .cfg_we_i(cfg_we),
    .cfg_group_i(cfg_group), .cfg_word_i(cfg_word), .cfg_wdata_i(cfg_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int overrides = 0, wraps = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_group(int g, bit [1023:0] v);
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      cfg_we = 1; cfg_group = GAW'(g); cfg_word = WAW'(w); cfg_wdata = v[w*32 +: 32];
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  sel_t sel [K];
  int   off [K];
  int   lane_of [K][X];   // lane feeding each signal, -1 if not chosen

  initial begin
    bit [1023:0] v;
    hc_cfg_t c;
    bit [MAXM-1:0] lm;
    int total, base, r, cnt, q;
    logic [M-1:0] pv, pe;
    logic expv;
    sig = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      total = 0;
      base = $urandom_range(0, M - 1);
      for (int g = 0; g < K; g++) write_group(g, '0);
      for (int g = 0; g < K; g++) begin
        sel[g] = '0;
        for (int i = 0; i < X; i++) begin
          lane_of[g][i] = -1;
          if (total < M && $urandom_range(0, 2) == 0) begin sel[g][i] = 1; total++; end
        end
        cnt = popcount(sel[g], X);
        off[g] = (base + total - cnt) % M;
        if (cnt > 0 && off[g] + cnt > M) wraps++;
        c  = hc_rev_cfg(X, M, sel[g], off[g]);
        lm = lane_mask(M, off[g], cnt);
        v = '0;
        v[HB-1:0] = c[HB-1:0];
        v[HB +: M] = lm[M-1:0];
        v[HB + M +: X] = sel[g][X-1:0];
        write_group(g, v);
        r = 0;
        for (int i = 0; i < X; i++) if (sel[g][i]) begin
          lane_of[g][i] = (off[g] + r) % M;
          r++;
        end
      end
      for (int t = 0; t < 10; t++) begin
        @(negedge clk);
        bval = M'($urandom);
        ben  = M'($urandom);
        pv = bval; pe = ben;
        for (int g = 0; g < K; g++) sig[g] = X'($urandom);
        @(negedge clk);
        for (int g = 0; g < K; g++)
          for (int i = 0; i < X; i++) begin
            q = lane_of[g][i];
            expv = sig[g][i];
            if (q >= 0 && pe[q]) begin expv = pv[q]; overrides++; end
            checks++;
            if (sig_out[g][i] !== expv) begin
              failures++;
              if (failures < 10) $display("FAIL trial %0d sig %0d.%0d", trial, g, i);
            end
          end
      end
    end
    checks += 2;
    if (overrides == 0) begin failures++; $display("FAIL no override exercised"); end
    if (wraps == 0) begin failures++; $display("FAIL no wrapping slice exercised"); end
    $display("overrides: %0d wrapping slices: %0d", overrides, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
