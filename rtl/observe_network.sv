// observe_network: the 'observe' half of the debug access network, a two-stage
// concentrator from K*X observable signals to an M-lane debug bus.
//
// Stage 1: one obs_group per IP block (hyper-concentrator, output registers,
// Input Select AND gates). Stage 2: an enabled OR-tree; lane q of the bus is
// the OR of lane q of every group, so the bus carries the signals of whichever
// group has enabled that lane. Software gives each group a disjoint slice of
// lanes; any set of at most M observable signals can then reach the bus, in
// some order. An assertion flags two groups enabling the same lane.
// Configuration writes: cfg_we_i with a group index and a word index.
// Timing: one clock from an observable signal to bus_o.
// The two-stage structure and the enabled OR-tree follow the published
// architecture; the assertion and the slice-per-group routing rule are this
// design's way of using it.
module observe_network #(
  parameter int unsigned K = 314,  // IP blocks (groups)
  parameter int unsigned X = 23,   // signals per group
  parameter int unsigned M = 23,   // bus lanes
  localparam int unsigned GAW = pdbg_pkg::clog2_min1(K),
  localparam int unsigned WAW = pdbg_pkg::cfg_word_aw(X, M)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  logic [K-1:0][X-1:0]         sig_i,
  input  logic                        cfg_we_i,
  input  logic [GAW-1:0]              cfg_group_i,
  input  logic [WAW-1:0]              cfg_word_i,
  input  logic [pdbg_pkg::CFG_DW-1:0] cfg_wdata_i,
  output logic [M-1:0]                bus_o
);

  logic [K-1:0][M-1:0] gated, lane_sel;

  for (genvar g = 0; g < K; g++) begin : g_grp
    obs_group #(.X(X), .M(M)) u_grp (
      .clk_i,
      .rst_ni,
      .sig_i       (sig_i[g]),
      .cfg_we_i    (cfg_we_i && cfg_group_i == GAW'(g)),
      .cfg_word_i,
      .cfg_wdata_i,
      .gated_o     (gated[g]),
      .lane_sel_o  (lane_sel[g])
    );
  end

  // Enabled OR-tree (the AND half of each enable is inside obs_group).
  always_comb begin
    bus_o = '0;
    for (int g = 0; g < K; g++) bus_o |= gated[g];
  end

  // At most one group may enable a given lane.
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
    else $error("observe_network: bus lanes %h enabled by more than one group", lane_clash);

endmodule
