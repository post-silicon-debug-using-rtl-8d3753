// ctrl_group: one IP block's slice of the 'control' access network, the mirror
// of obs_group.
//
// The M-lane control bus carries, per lane, an override value and an override
// enable. An M-bit Input Select register ANDs off the lanes this block does
// not own; the mirrored hyper-concentrator spreads the owned lanes onto the
// chosen controllable signals, and its outputs are registered. An X-bit
// target mask (this design's addition) clears the enables of signals that were
// not chosen, since the mirrored network can leave copies on them. A
// controllable signal is replaced by the override value while its registered
// enable is set, and otherwise passes through unchanged (sig_o = sig_i).
// Configuration as in obs_group: flip-flops with enable written by 32-bit
// word, synchronous active-low reset to zero (nothing overridden).
// Timing: one clock from the control bus to an overridden signal.
// The published architecture only says the control network mirrors the
// observe network; the value/enable lanes, target mask and override mux are
// this design's own.
module ctrl_group #(
  parameter int unsigned X = 23,
  parameter int unsigned M = 23,
  localparam int unsigned HB  = pdbg_pkg::hc_cfg_bits(X, M),
  localparam int unsigned NB  = pdbg_pkg::ctrl_cfg_bits(X, M),
  localparam int unsigned WAW = pdbg_pkg::cfg_word_aw(X, M)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  logic [M-1:0]                bus_val_i,  // control bus: override values
  input  logic [M-1:0]                bus_en_i,   // control bus: override enables
  input  logic [X-1:0]                sig_i,      // signals as driven by the source block
  output logic [X-1:0]                sig_o,      // signals as seen by the sink block
  input  logic                        cfg_we_i,
  input  logic [WAW-1:0]              cfg_word_i,
  input  logic [pdbg_pkg::CFG_DW-1:0] cfg_wdata_i,
  output logic [M-1:0]                lane_sel_o  // Input Select register (lanes owned)
);

  logic [NB-1:0]     cfg_q;
  logic [M-1:0]      lane_sel;
  logic [X-1:0]      tgt_mask;
  logic [M-1:0][1:0] lanes;     // {enable, value} per owned lane
  logic [X-1:0][1:0] spread;
  logic [X-1:0]      ov_val_q, ov_en_q;

  for (genvar b = 0; b < NB; b++) begin : g_cfg
    always_ff @(posedge clk_i) begin
      if (!rst_ni) cfg_q[b] <= 1'b0;
      else if (cfg_we_i && cfg_word_i == WAW'(b / pdbg_pkg::CFG_DW))
        cfg_q[b] <= cfg_wdata_i[b % pdbg_pkg::CFG_DW];
    end
  end

  assign lane_sel   = cfg_q[HB +: M];
  assign tgt_mask   = cfg_q[HB + M +: X];
  assign lane_sel_o = lane_sel;

  for (genvar q = 0; q < M; q++) begin : g_lane
    assign lanes[q] = {bus_en_i[q] & lane_sel[q], bus_val_i[q] & lane_sel[q]};
  end

  hyperconcentrator_rev #(.X(X), .M(M), .W(2)) u_hc (
    .din  (lanes),
    .cfg  (cfg_q[HB-1:0]),
    .dout (spread)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      ov_val_q <= '0;
      ov_en_q  <= '0;
    end else begin
      for (int i = 0; i < X; i++) begin
        ov_val_q[i] <= spread[i][0];
        ov_en_q[i]  <= spread[i][1] & tgt_mask[i];
      end
    end
  end

  for (genvar i = 0; i < X; i++) begin : g_ovr
    assign sig_o[i] = ov_en_q[i] ? ov_val_q[i] : sig_i[i];
  end

endmodule
