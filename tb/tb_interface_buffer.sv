// tb_interface_buffer: self-checking test of the PLC interface buffer at its
// default size (23 lanes, up to 4:1). For each clock ratio 1..4 it drives
// random observe-bus samples and random PLC control words every clock and
// checks, cycle by cycle:
//   * plc_ce_o pulses exactly once every `ratio` clocks (the PLC frame rate);
//   * in a plc_ce_o cycle, slot r of every lane holds the bus sample of
//     `ratio - r` clocks earlier (the whole previous frame, oldest first);
//   * the control word presented in a plc_ce_o cycle appears on the control
//     bus one pair per clock, slot s exactly s+1 clocks later.
module tb_interface_buffer;
  localparam int M = 23, R_MAX = 4;
  localparam int RW = pdbg_pkg::clog2_min1(R_MAX + 1);

  logic clk = 0, rst_n = 0;
  logic [RW-1:0] ratio = RW'(1);
  logic ce;
  logic [M-1:0] obs_bus = '0;
  logic [M-1:0][R_MAX-1:0] plc_obs, pval = '0, pen = '0;
  logic [M-1:0] cval, cen;

  interface_buffer #(.M(M), .R_MAX(R_MAX)) dut (
    .clk_i(clk), .rst_ni(rst_n), .ratio_i(ratio), .plc_ce_o(ce),
    .obs_bus_i(obs_bus), .plc_obs_o(plc_obs),
    .plc_ctrl_val_i(pval), .plc_ctrl_en_i(pen),
    .ctrl_val_o(cval), .ctrl_en_o(cen));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [M-1:0] hist [16];
  logic [M-1:0][R_MAX-1:0] wval, wen;
  int load_n, last_ce, frames;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (ratio %0d)", what, ratio);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 1; r <= R_MAX; r++) begin
      @(negedge clk);
      ratio = RW'(r);
      repeat (2 * R_MAX + 2) @(negedge clk);   // let the phase settle
      load_n = -100; last_ce = -100; frames = 0;
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        // observe side
        if (ce) begin
          if (last_ce >= 0) chk(n - last_ce == r, "frame period");
          if (n >= r)
            for (int s = 0; s < r; s++)
              for (int q = 0; q < M; q++)
                chk(plc_obs[q][s] == hist[(n - r + s) % 16][q], "observe slot");
          last_ce = n;
          frames++;
        end
        // control side
        if (n >= load_n + 1 && n <= load_n + r)
          for (int q = 0; q < M; q++) begin
            chk(cval[q] == wval[q][n - load_n - 1], "control value slot");
            chk(cen[q]  == wen[q][n - load_n - 1],  "control enable slot");
          end
        // new stimulus for this cycle, taken at its closing edge
        obs_bus = M'($urandom);
        hist[n % 16] = obs_bus;
        for (int q = 0; q < M; q++) begin
          pval[q] = R_MAX'($urandom);
          pen[q]  = R_MAX'($urandom);
        end
        if (ce) begin
          load_n = n;
          wval = pval;
          wen  = pen;
        end
      end
      chk(frames == 200 / r || frames == 200 / r + 1, "frame count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
