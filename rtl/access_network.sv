// access_network: the programmable access network between the chip's
// observable/controllable signals and the debug bus: an observe_network and a
// control_network over the same K groups of X signals, plus the decode of the
// configuration port that programs their routing bits.
//
// Configuration address = {space[1:0], group, word}: space 0 writes a word of
// an observe group, space 1 a word of a control group (other spaces are
// ignored here). Word w of a group holds its configuration bits 32*w..32*w+31
// (layout in pdbg_pkg). Writes take effect at the next clock edge.
// Observed signals are taken as driven by their source (sig_i); sig_o is what
// the sink sees, equal to sig_i unless overridden.
// Timing: sig_i to obs_bus_o one clock; ctrl_*_i to sig_o one clock.
// Observe plus control network as published; the address map is this
// design's own.
module access_network #(
  parameter int unsigned K = 314,
  parameter int unsigned X = 23,
  parameter int unsigned M = 23,
  localparam int unsigned GAW = pdbg_pkg::clog2_min1(K),
  localparam int unsigned WAW = pdbg_pkg::cfg_word_aw(X, M),
  localparam int unsigned AW  = pdbg_pkg::cfg_aw(K, X, M)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  logic [K-1:0][X-1:0]         sig_i,
  output logic [K-1:0][X-1:0]         sig_o,
  output logic [M-1:0]                obs_bus_o,
  input  logic [M-1:0]                ctrl_val_i,
  input  logic [M-1:0]                ctrl_en_i,
  input  logic                        cfg_we_i,
  input  logic [AW-1:0]               cfg_addr_i,
  input  logic [pdbg_pkg::CFG_DW-1:0] cfg_wdata_i
);
  import pdbg_pkg::*;

  cfg_space_e       space;
  logic [GAW-1:0]   group;
  logic [WAW-1:0]   word;

  assign space = cfg_space_e'(cfg_addr_i[AW-1 -: 2]);
  assign group = cfg_addr_i[WAW +: GAW];
  assign word  = cfg_addr_i[WAW-1:0];

  observe_network #(.K(K), .X(X), .M(M)) u_obs (
    .clk_i,
    .rst_ni,
    .sig_i,
    .cfg_we_i    (cfg_we_i && space == SP_OBSERVE),
    .cfg_group_i (group),
    .cfg_word_i  (word),
    .cfg_wdata_i,
    .bus_o       (obs_bus_o)
  );

  control_network #(.K(K), .X(X), .M(M)) u_ctrl (
    .clk_i,
    .rst_ni,
    .bus_val_i   (ctrl_val_i),
    .bus_en_i    (ctrl_en_i),
    .sig_i,
    .sig_o,
    .cfg_we_i    (cfg_we_i && space == SP_CONTROL),
    .cfg_group_i (group),
    .cfg_word_i  (word),
    .cfg_wdata_i
  );

endmodule
