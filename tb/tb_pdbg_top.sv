// tb_pdbg_top: end-to-end test of pdbg_top at a reduced size, 230 signals
// (10 groups of 23) with the default 23 lanes and 4:1 buffers. Stimulus,
// behavioural PLC and checks are in pdbg_checker.
module tb_pdbg_top;
  localparam int N = 230, M = 23, X = 23, R_MAX = 4;
  localparam int K  = (N + X - 1) / X;
  localparam int AW = pdbg_pkg::cfg_aw(K, X, M);

  logic clk = 0;
  logic rst_n, cfg_we, plc_ce;
  logic [N-1:0] sig, sig_out;
  logic [AW-1:0] cfg_addr;
  logic [31:0] cfg_wdata;
  logic [M-1:0][R_MAX-1:0] plc_obs, plc_val, plc_en;

  always #5 clk = ~clk;

  pdbg_top #(.N_SIG(N), .M(M), .X(X), .R_MAX(R_MAX)) dut (
    .clk_i(clk), .rst_ni(rst_n), .sig_i(sig), .sig_o(sig_out),
    .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata),
    .plc_ce_o(plc_ce), .plc_obs_o(plc_obs),
    .plc_ctrl_val_i(plc_val), .plc_ctrl_en_i(plc_en));

  pdbg_checker #(.N(N), .M(M), .X(X), .R_MAX(R_MAX)) u_chk (
    .clk, .rst_n, .sig, .sig_out, .cfg_we, .cfg_addr, .cfg_wdata,
    .plc_ce, .plc_obs, .plc_val, .plc_en);
endmodule
