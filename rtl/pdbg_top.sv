// pdbg_top: post-silicon debug architecture around a programmable logic core
// (PLC). Up to N_SIG signals that connect the chip's IP blocks are wired in at
// design time; after fabrication, software picks any M of them to observe and
// any M to override, and the PLC (outside this module, on the plc_* ports)
// processes the observed values at its own, slower clock and drives the
// overrides.
//
// Contents: access_network (K = ceil(N_SIG/X) groups of X signals, each with a
// hyper-concentrator, onto an M-lane observe bus and from an M-lane control
// bus) and interface_buffer (serial-to-parallel and parallel-to-serial buffers
// for a clock ratio of up to R_MAX between chip and PLC). The last group is
// padded with constant zeros; synthesis removes the unused logic.
// Configuration port: 32-bit word writes, address {space, group, word};
// space 2 (global) word 0 bits [RW-1:0] set the clock ratio (reset 1 =
// bypass). See access_network for spaces 0 and 1.
// Timing: a signal reaches the observe bus one clock after it changes and the
// PLC pins in the following frame; plc_ce_o marks the PLC clock edges.
// The block structure (access network, interface buffer, PLC) and the sizes
// (7200 signals, 23 at a time, 4:1) are published; the configuration port and
// the global ratio register are this design's own. The padding bits of the
// last group leave a few unused outputs of the access network (lint notes
// them as unused; they are removed in synthesis).
module pdbg_top #(
  parameter int unsigned N_SIG = 7200, // observable/controllable signals
  parameter int unsigned M     = 23,   // simultaneously observable (and controllable) signals
  parameter int unsigned X     = 23,   // signals per group (IP block), X <= M
  parameter int unsigned R_MAX = 4,    // chip : PLC clock ratio supported by the buffers
  localparam int unsigned K  = (N_SIG + X - 1) / X,
  localparam int unsigned AW = pdbg_pkg::cfg_aw(K, X, M),
  localparam int unsigned RW = pdbg_pkg::clog2_min1(R_MAX + 1)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  // observable/controllable signals, cut between source and sink block
  input  logic [N_SIG-1:0]            sig_i,
  output logic [N_SIG-1:0]            sig_o,
  // configuration port (from the on-chip processor over the NoC/shared bus)
  input  logic                        cfg_we_i,
  input  logic [AW-1:0]               cfg_addr_i,
  input  logic [pdbg_pkg::CFG_DW-1:0] cfg_wdata_i,
  // PLC pins
  output logic                        plc_ce_o,
  output logic [M-1:0][R_MAX-1:0]     plc_obs_o,
  input  logic [M-1:0][R_MAX-1:0]     plc_ctrl_val_i,
  input  logic [M-1:0][R_MAX-1:0]     plc_ctrl_en_i
);
  import pdbg_pkg::*;

  logic [K*X-1:0]      sig_pad, sig_pad_o;
  logic [M-1:0]        obs_bus, ctrl_val, ctrl_en;
  logic [RW-1:0]       ratio_q;

  always_comb begin
    sig_pad = '0;
    sig_pad[N_SIG-1:0] = sig_i;
  end
  assign sig_o = sig_pad_o[N_SIG-1:0];

  // Global register: clock ratio of the interface buffer.
  always_ff @(posedge clk_i) begin
    if (!rst_ni) ratio_q <= RW'(1);
    else if (cfg_we_i && cfg_space_e'(cfg_addr_i[AW-1 -: 2]) == SP_GLOBAL
             && cfg_addr_i[AW-3:0] == '0)
      ratio_q <= cfg_wdata_i[RW-1:0];
  end

  access_network #(.K(K), .X(X), .M(M)) u_net (
    .clk_i,
    .rst_ni,
    .sig_i      (sig_pad),
    .sig_o      (sig_pad_o),
    .obs_bus_o  (obs_bus),
    .ctrl_val_i (ctrl_val),
    .ctrl_en_i  (ctrl_en),
    .cfg_we_i,
    .cfg_addr_i,
    .cfg_wdata_i
  );

  interface_buffer #(.M(M), .R_MAX(R_MAX)) u_ifb (
    .clk_i,
    .rst_ni,
    .ratio_i        (ratio_q),
    .plc_ce_o,
    .obs_bus_i      (obs_bus),
    .plc_obs_o,
    .plc_ctrl_val_i,
    .plc_ctrl_en_i,
    .ctrl_val_o     (ctrl_val),
    .ctrl_en_o      (ctrl_en)
  );

endmodule
