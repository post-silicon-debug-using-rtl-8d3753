// hyperconcentrator_rev: the mirror of the hyper-concentrator, used in the
// 'control' direction of the debug access network (one per IP block).
//
// It takes a contiguous, cyclically wrapping range of the M-wide control bus
// and spreads the signals in it back onto any chosen subset of the X
// controllable signals of one IP block. It is the forward network run
// backwards, again from 2:1 muxes with one routing bit each:
//   1. RS rotation stages of M muxes; stage s rotates by 2^s mod M in the
//      direction opposite to the forward network (out[j] = in[j + 2^s]).
//   2. CS expansion stages over CW positions, from s = CS-1 down to 0; the mux
//      at position j either keeps its input (bit 0) or takes the signal from
//      position j - 2^s (bit 1).
// Outputs that receive no routed signal may carry copies of routed ones; the
// control group masks them off. Routing-bit layout as in pdbg_pkg (same
// index formula as the forward network). Purely combinational, W bits per
// routed signal (value and override-enable in the control network).
module hyperconcentrator_rev #(
  parameter int unsigned X = 23,   // controllable signals of one IP block, X <= M
  parameter int unsigned M = 23,   // width of the control bus
  parameter int unsigned W = 2,    // bits per routed signal
  localparam int unsigned CW = pdbg_pkg::hc_cw(X),
  localparam int unsigned CS = pdbg_pkg::hc_cs(X),
  localparam int unsigned RS = pdbg_pkg::hc_rs(M),
  localparam int unsigned NB = pdbg_pkg::hc_cfg_bits(X, M)
) (
  input  logic [M-1:0][W-1:0] din,
  input  logic [NB-1:0]       cfg,
  output logic [X-1:0][W-1:0] dout
);

  logic [M-1:0][W-1:0]  rot [RS+1];
  logic [CW-1:0][W-1:0] exp [CS+1];

  assign rot[0] = din;

  for (genvar s = 0; s < RS; s++) begin : g_rstage
    localparam int unsigned A = (1 << s) % M;
    for (genvar j = 0; j < M; j++) begin : g_rmux
      assign rot[s+1][j] = cfg[CS*CW + s*M + j] ? rot[s][(j + A) % M] : rot[s][j];
    end
  end

  for (genvar j = 0; j < CW; j++) begin : g_mid
    if (j < M) begin : g_used
      assign exp[CS][j] = rot[RS][j];
    end else begin : g_pad
      assign exp[CS][j] = '0;
    end
  end

  for (genvar s = 0; s < CS; s++) begin : g_estage
    for (genvar j = 0; j < CW; j++) begin : g_emux
      if (j >= (1 << s)) begin : g_mux
        assign exp[s][j] = cfg[s*CW + j] ? exp[s+1][j - (1 << s)] : exp[s+1][j];
      end else begin : g_keep
        assign exp[s][j] = exp[s+1][j];
      end
    end
  end

  for (genvar i = 0; i < X; i++) begin : g_out
    assign dout[i] = exp[0][i];
  end

endmodule
