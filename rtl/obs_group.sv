// obs_group: one IP block's slice of the 'observe' access network.
//
// The block's X observable signals pass through a hyper-concentrator whose
// M outputs are registered (so the network runs at the speed of the chip).
// An M-bit Input Select register then gates the registered outputs with AND
// gates; only the bus lanes this block owns are let through to the shared
// OR-tree bus. Routing bits, Input Select and all other configuration sit in
// flip-flops with enable, written one 32-bit word at a time (cfg_we with a
// word index). Configuration resets to zero (synchronous, active-low rst_ni): no lane
// selected, bus quiet.
// Timing: a signal change appears at gated_o one clock later.
// The group structure (hyper-concentrator, output registers, Input Select
// AND gates) follows the published observe-network architecture; the
// configuration storage and its word-write port are this design's own.
module obs_group #(
  parameter int unsigned X = 23,
  parameter int unsigned M = 23,
  localparam int unsigned HB  = pdbg_pkg::hc_cfg_bits(X, M),
  localparam int unsigned NB  = pdbg_pkg::obs_cfg_bits(X, M),
  localparam int unsigned WAW = pdbg_pkg::cfg_word_aw(X, M)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  logic [X-1:0]                sig_i,      // observable signals of this IP block
  input  logic                        cfg_we_i,   // write one configuration word
  input  logic [WAW-1:0]              cfg_word_i,
  input  logic [pdbg_pkg::CFG_DW-1:0] cfg_wdata_i,
  output logic [M-1:0]                gated_o,    // this block's contribution to the bus
  output logic [M-1:0]                lane_sel_o  // Input Select register (lanes owned)
);

  logic [NB-1:0]      cfg_q;
  logic [M-1:0][0:0]  hc_out;
  logic [M-1:0]       hc_q;

  for (genvar b = 0; b < NB; b++) begin : g_cfg
    always_ff @(posedge clk_i) begin
      if (!rst_ni) cfg_q[b] <= 1'b0;
      else if (cfg_we_i && cfg_word_i == WAW'(b / pdbg_pkg::CFG_DW))
        cfg_q[b] <= cfg_wdata_i[b % pdbg_pkg::CFG_DW];
    end
  end

  hyperconcentrator #(.X(X), .M(M), .W(1)) u_hc (
    .din  (sig_i),
    .cfg  (cfg_q[HB-1:0]),
    .dout (hc_out)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_ni) hc_q <= '0;
    else         hc_q <= hc_out;
  end

  // Input Select: AND gates enabling this block's lanes onto the bus.
  assign lane_sel_o = cfg_q[NB-1:HB];
  assign gated_o    = hc_q & lane_sel_o;

endmodule
