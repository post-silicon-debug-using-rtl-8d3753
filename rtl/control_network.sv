// control_network: the 'control' half of the debug access network, the mirror
// of observe_network. The M-lane control bus (value and enable per lane) is
// broadcast to one ctrl_group per IP block; each group takes the lanes its
// Input Select enables and spreads them onto its chosen controllable signals.
// Any set of at most M controllable signals can be overridden at once.
// Every controllable signal passes from sig_i to sig_o and is replaced only
// while an override is active. An assertion flags two groups claiming the
// same lane. Timing: one clock from the control bus to sig_o.
// Built as the mirror of the observe network, as published; its details
// (see ctrl_group) are this design's own.
module control_network #(
  parameter int unsigned K = 314,
  parameter int unsigned X = 23,
  parameter int unsigned M = 23,
  localparam int unsigned GAW = pdbg_pkg::clog2_min1(K),
  localparam int unsigned WAW = pdbg_pkg::cfg_word_aw(X, M)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  logic [M-1:0]                bus_val_i,
  input  logic [M-1:0]                bus_en_i,
  input  logic [K-1:0][X-1:0]         sig_i,
  output logic [K-1:0][X-1:0]         sig_o,
  input  logic                        cfg_we_i,
  input  logic [GAW-1:0]              cfg_group_i,
  input  logic [WAW-1:0]              cfg_word_i,
  input  logic [pdbg_pkg::CFG_DW-1:0] cfg_wdata_i
);

  logic [K-1:0][M-1:0] lane_sel;

  for (genvar g = 0; g < K; g++) begin : g_grp
    ctrl_group #(.X(X), .M(M)) u_grp (
      .clk_i,
      .rst_ni,
      .bus_val_i,
      .bus_en_i,
      .sig_i       (sig_i[g]),
      .sig_o       (sig_o[g]),
      .cfg_we_i    (cfg_we_i && cfg_group_i == GAW'(g)),
      .cfg_word_i,
      .cfg_wdata_i,
      .lane_sel_o  (lane_sel[g])
    );
  end

  logic [M-1:0] lane_seen, lane_clash;
  always_comb begin
    lane_seen  = '0;
    lane_clash = '0;
    for (int g = 0; g < K; g++) begin
      lane_clash |= lane_seen & lane_sel[g];
      lane_seen  |= lane_sel[g];
    end
  end

  a_one_group_per_lane: assert property (@(posedge clk_i) disable iff (!rst_ni) lane_clash == '0)
    else $error("control_network: bus lanes %h claimed by more than one group", lane_clash);

endmodule
