// hyperconcentrator: configurable X-input, M-output hyper-concentrator for the
// 'observe' direction of the debug access network (one per IP block).
//
// Any subset of the X inputs can be routed onto any contiguous, cyclically
// wrapping range of the M outputs; the order of the routed signals inside the
// range is not guaranteed to the user (here it happens to be input order).
// This is what the access network needs: each IP block's selected signals land
// in their own contiguous slice of the M-wide debug bus.
//
// Structure (built only from 2:1 muxes, each with its own routing bit, as the
// architecture prescribes; the exact construction is this design's own):
//   1. Compaction, CS = log2(CW) stages over CW = X rounded up to a power of
//      two. In stage s the mux at position j either keeps its input (bit 0) or
//      takes the signal from position j + 2^s (bit 1). Moving every selected
//      signal down by its count of unselected inputs below it, one binary digit
//      per stage from the least significant, is collision free, so the selected
//      signals end up packed in positions 0..cnt-1.
//   2. Cyclic rotation, RS = ceil(log2(M)) stages of M muxes; stage s rotates
//      by 2^s mod M, so any offset 0..M-1 can be set.
// Routing bits come from cfg (layout in pdbg_pkg); software computes them.
// Purely combinational; the caller registers the outputs. Each signal is W
// bits wide so the same network can carry several bits per routed signal.
module hyperconcentrator #(
  parameter int unsigned X = 23,   // inputs (signals of one IP block), X <= M
  parameter int unsigned M = 23,   // outputs (width of the debug bus)
  parameter int unsigned W = 1,    // bits per routed signal
  localparam int unsigned CW = pdbg_pkg::hc_cw(X),
  localparam int unsigned CS = pdbg_pkg::hc_cs(X),
  localparam int unsigned RS = pdbg_pkg::hc_rs(M),
  localparam int unsigned NB = pdbg_pkg::hc_cfg_bits(X, M)
) (
  input  logic [X-1:0][W-1:0] din,
  input  logic [NB-1:0]       cfg,
  output logic [M-1:0][W-1:0] dout
);

  logic [CW-1:0][W-1:0] comp [CS+1];
  logic [M-1:0][W-1:0]  rot  [RS+1];

  for (genvar j = 0; j < CW; j++) begin : g_in
    if (j < X) begin : g_used
      assign comp[0][j] = din[j];
    end else begin : g_pad
      assign comp[0][j] = '0;
    end
  end

  for (genvar s = 0; s < CS; s++) begin : g_cstage
    for (genvar j = 0; j < CW; j++) begin : g_cmux
      if (j + (1 << s) < CW) begin : g_mux
        assign comp[s+1][j] = cfg[s*CW + j] ? comp[s][j + (1 << s)] : comp[s][j];
      end else begin : g_keep
        assign comp[s+1][j] = comp[s][j];
      end
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_mid
    if (j < CW) begin : g_used
      assign rot[0][j] = comp[CS][j];
    end else begin : g_pad
      assign rot[0][j] = '0;
    end
  end

  for (genvar s = 0; s < RS; s++) begin : g_rstage
    localparam int unsigned A = (1 << s) % M;
    for (genvar j = 0; j < M; j++) begin : g_rmux
      assign rot[s+1][j] = cfg[CS*CW + s*M + j] ? rot[s][(j + M - A) % M] : rot[s][j];
    end
  end

  assign dout = rot[RS];

endmodule
