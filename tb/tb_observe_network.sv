// tb_observe_network: self-checking test of the observe access network at a
// reduced size (6 groups of 5 signals, 8-lane bus). Each trial picks a random
// set of at most M signals spread over the groups, gives each group a slice
// of lanes starting at a random (wrapping) offset, programs routing bits and
// Input Select through the configuration port, then drives random signal
// values. Expected bus: lane (off_g + r) mod M carries the r-th chosen signal
// of group g one clock after it was driven; lanes nobody owns read 0.
module tb_observe_network;
  import hc_route_pkg::*;

  localparam int K = 6, X = 5, M = 8;
  localparam int HB  = pdbg_pkg::hc_cfg_bits(X, M);
  localparam int NB  = pdbg_pkg::obs_cfg_bits(X, M);
  localparam int NW  = pdbg_pkg::cfg_words(NB);
  localparam int GAW = pdbg_pkg::clog2_min1(K);
  localparam int WAW = pdbg_pkg::cfg_word_aw(X, M);

  logic clk = 0, rst_n = 0;
  logic [K-1:0][X-1:0] sig;
  logic cfg_we = 0;
  logic [GAW-1:0] cfg_group = '0;
  logic [WAW-1:0] cfg_word = '0;
  logic [31:0] cfg_wdata = '0;
  logic [M-1:0] bus;

  observe_network #(.K(K), .X(X), .M(M)) dut (
    .clk_i(clk), .rst_ni(rst_n), .sig_i(sig), .cfg_we_i(cfg_we),
    .cfg_group_i(cfg_group), .cfg_word_i(cfg_word), .cfg_wdata_i(cfg_wdata), .bus_o(bus));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int wraps = 0;

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
  int   lane_src_g [M], lane_src_i [M];

  initial begin
    bit [1023:0] v;
    hc_cfg_t c;
    bit [MAXM-1:0] lm;
    int total, base, r, cnt;
    logic [K-1:0][X-1:0] prev;
    sig = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // after reset nothing is selected: bus must stay quiet
    for (int t = 0; t < 5; t++) begin
      @(negedge clk);
      for (int g = 0; g < K; g++) sig[g] = X'($urandom);
      checks++;
      if (bus !== '0) begin failures++; $display("FAIL bus not quiet after reset"); end
    end
    for (int trial = 0; trial < 60; trial++) begin
      total = 0;
      base = $urandom_range(0, M - 1);
      for (int q = 0; q < M; q++) lane_src_g[q] = -1;
      // release every lane before handing out new slices
      for (int g = 0; g < K; g++) write_group(g, '0);
      for (int g = 0; g < K; g++) begin
        sel[g] = '0;
        for (int i = 0; i < X; i++)
          if (total < M && $urandom_range(0, 2) == 0) begin sel[g][i] = 1; total++; end
        cnt = popcount(sel[g], X);
        off[g] = (base + total - cnt) % M;
        if (cnt > 0 && off[g] + cnt > M) wraps++;
        c  = hc_fwd_cfg(X, M, sel[g], off[g]);
        lm = lane_mask(M, off[g], cnt);
        v = '0;
        v[HB-1:0] = c[HB-1:0];
        v[HB +: M] = lm[M-1:0];
        write_group(g, v);
        r = 0;
        for (int i = 0; i < X; i++) if (sel[g][i]) begin
          lane_src_g[(off[g] + r) % M] = g;
          lane_src_i[(off[g] + r) % M] = i;
          r++;
        end
      end
      for (int t = 0; t < 10; t++) begin
        @(negedge clk);
        prev = sig;
        for (int g = 0; g < K; g++) sig[g] = X'($urandom);
        @(negedge clk);
        for (int q = 0; q < M; q++) begin
          checks++;
          if (lane_src_g[q] < 0) begin
            if (bus[q] !== 1'b0) begin failures++; $display("FAIL unowned lane %0d", q); end
          end else if (bus[q] !== sig[lane_src_g[q]][lane_src_i[q]]) begin
            failures++;
            if (failures < 10) $display("FAIL trial %0d lane %0d", trial, q);
          end
        end
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrapping lane slice exercised"); end
    $display("wrapping slices: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
