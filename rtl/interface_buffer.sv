// interface_buffer: buffering between the access network, which runs at the
// clock of the chip, and the PLC pins, which run at up to R_MAX (4) times
// slower. Every bus lane has its own buffer of R_MAX flip-flops with enable:
//   observe: serial-to-parallel. A phase counter p runs 0..ratio-1; sample p
//     of a frame is written into slot p. During the cycle with p == 0
//     (plc_ce_o high) the slots hold the complete previous frame, oldest
//     sample in slot 0, and the PLC captures them at the end of that cycle.
//   control: parallel-to-serial. At the end of each p == 0 cycle the PLC's
//     word of R_MAX {enable, value} pairs per lane is loaded; one pair per
//     clock is then shifted out, slot 0 first.
// plc_ce_o stands for the PLC's slower clock edge: the PLC is modelled as
// running on the same clock with this enable (ratio-related clocks; a
// mixed-timing synchroniser for unrelated clocks is not part of this design).
// ratio_i = 1 is the bypass: every cycle is a frame of one sample.
// Latency: observe, a bus sample taken in phase p reaches the PLC in the next
// frame; control, a word the PLC drives at its edge is on the bus one to
// ratio clocks after its next edge, slot s appearing s+1 clocks after loading.
// Published: one buffer per PLC pin, flip-flops with enable, storage for a
// 4:1 ratio, optional. The slot/frame timing, the control-side buffer, the
// bypass and the clock-enable model are this design's own.
module interface_buffer #(
  parameter int unsigned M     = 23,  // bus lanes
  parameter int unsigned R_MAX = 4,   // largest clock ratio supported
  localparam int unsigned RW = pdbg_pkg::clog2_min1(R_MAX + 1)
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic [RW-1:0]                 ratio_i,        // 1..R_MAX (0 treated as 1)
  output logic                          plc_ce_o,       // PLC clock-edge enable
  // observe
  input  logic [M-1:0]                  obs_bus_i,
  output logic [M-1:0][R_MAX-1:0]       plc_obs_o,      // to PLC input pins
  // control
  input  logic [M-1:0][R_MAX-1:0]       plc_ctrl_val_i, // from PLC output pins
  input  logic [M-1:0][R_MAX-1:0]       plc_ctrl_en_i,
  output logic [M-1:0]                  ctrl_val_o,
  output logic [M-1:0]                  ctrl_en_o
);

  logic [RW-1:0] phase_q;
  logic          last_phase;

  assign last_phase = (ratio_i <= RW'(1)) || (phase_q >= ratio_i - RW'(1));

  always_ff @(posedge clk_i) begin
    if (!rst_ni)         phase_q <= '0;
    else if (last_phase) phase_q <= '0;
    else                 phase_q <= phase_q + RW'(1);
  end

  assign plc_ce_o = (phase_q == '0);

  logic [M-1:0][R_MAX-1:0] obs_q, cval_q, cen_q;

  for (genvar q = 0; q < M; q++) begin : g_lane
    for (genvar r = 0; r < R_MAX; r++) begin : g_slot
      always_ff @(posedge clk_i) begin
        if (!rst_ni) begin
          obs_q[q][r]  <= 1'b0;
          cval_q[q][r] <= 1'b0;
          cen_q[q][r]  <= 1'b0;
        end else begin
          if (phase_q == RW'(r)) obs_q[q][r] <= obs_bus_i[q];
          if (plc_ce_o) begin
            cval_q[q][r] <= plc_ctrl_val_i[q][r];
            cen_q[q][r]  <= plc_ctrl_en_i[q][r];
          end else if (r + 1 < R_MAX) begin
            cval_q[q][r] <= cval_q[q][(r + 1) % R_MAX];
            cen_q[q][r]  <= cen_q[q][(r + 1) % R_MAX];
          end else begin
            cval_q[q][r] <= 1'b0;
            cen_q[q][r]  <= 1'b0;
          end
        end
      end
    end
    assign ctrl_val_o[q] = cval_q[q][0];
    assign ctrl_en_o[q]  = cen_q[q][0];
  end

  assign plc_obs_o = obs_q;

endmodule
