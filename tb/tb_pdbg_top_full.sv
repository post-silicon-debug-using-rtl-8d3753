// tb_pdbg_top_full: end-to-end test of pdbg_top at its default size, 7200
// observable/controllable signals in 314 groups of 23, a 23-lane bus and 4:1
// buffers. The same steps and checks as tb_pdbg_top (see pdbg_checker).
module tb_pdbg_top_full;
  localparam int N = 7200, M = 23, X = 23, R_MAX = 4;
  localparam int K  = (N + X - 1) / X;
  localparam int AW = pdbg_pkg::cfg_aw(K, X, M);

  logic clk = 0;
  logic rst_n, cfg_we, plc_ce;
  logic [N-1:0] sig, sig_out;
  logic [AW-1:0] cfg_addr;
  logic [31:0] cfg_wdata;
  logic [M-1:0][R_MAX-1:0] plc_obs, plc_val, plc_en;

  always #5 clk = ~clk;

  pdbg_top dut (
    .clk_i(clk), .rst_ni(rst_n), .sig_i(sig), .sig_o(sig_out),
    .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata),
    .plc_ce_o(plc_ce), .plc_obs_o(plc_obs),
    .plc_ctrl_val_i(plc_val), .plc_ctrl_en_i(plc_en));

  pdbg_checker #(.N(N), .M(M), .X(X), .R_MAX(R_MAX)) u_chk (
    .clk, .rst_n, .sig, .sig_out, .cfg_we, .cfg_addr, .cfg_wdata,
    .plc_ce, .plc_obs, .plc_val, .plc_en);
endmodule
