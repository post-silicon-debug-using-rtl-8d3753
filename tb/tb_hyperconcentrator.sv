// tb_hyperconcentrator: self-checking test of the forward hyper-concentrator.
// Two instances (23x23 as in the default configuration, and 5 inputs onto an
// 8-lane bus) are given random selections, random bus offsets and random data.
// Routing bits come from hc_route_pkg; the expected output is worked out
// directly: the r-th selected input must appear on lane (off + r) mod M.
// The network is combinational, so each check follows a short settle delay.
module tb_hyperconcentrator;
  import hc_route_pkg::*;

  localparam int X1 = 23, M1 = 23;
  localparam int X2 = 5,  M2 = 8;

  logic [X1-1:0][0:0] din1;
  logic [M1-1:0][0:0] dout1;
  logic [pdbg_pkg::hc_cfg_bits(X1, M1)-1:0] cfg1;
  logic [X2-1:0][1:0] din2;
  logic [M2-1:0][1:0] dout2;
  logic [pdbg_pkg::hc_cfg_bits(X2, M2)-1:0] cfg2;

  hyperconcentrator #(.X(X1), .M(M1), .W(1)) dut1 (.din(din1), .cfg(cfg1), .dout(dout1));
  hyperconcentrator #(.X(X2), .M(M2), .W(2)) dut2 (.din(din2), .cfg(cfg2), .dout(dout2));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_t sel;
    hc_cfg_t c;
    int off, r, lane;
    for (int t = 0; t < 400; t++) begin
      // instance 1
      sel = '0;
      for (int i = 0; i < X1; i++) sel[i] = ($urandom_range(0, 3) == 0) || (t % 50 == 0);
      off = $urandom_range(0, M1 - 1);
      c = hc_fwd_cfg(X1, M1, sel, off);
      cfg1 = c[pdbg_pkg::hc_cfg_bits(X1, M1)-1:0];
      for (int v = 0; v < 4; v++) begin
        for (int i = 0; i < X1; i++) din1[i] = 1'($urandom);
        #1;
        r = 0;
        for (int i = 0; i < X1; i++) if (sel[i]) begin
          lane = (off + r) % M1;
          checks++;
          if (dout1[lane] !== din1[i]) begin
            failures++;
            if (failures < 10) $display("FAIL hc1 t=%0d in=%0d lane=%0d", t, i, lane);
          end
          r++;
        end
      end
      // instance 2
      sel = '0;
      for (int i = 0; i < X2; i++) sel[i] = 1'($urandom);
      off = $urandom_range(0, M2 - 1);
      c = hc_fwd_cfg(X2, M2, sel, off);
      cfg2 = c[pdbg_pkg::hc_cfg_bits(X2, M2)-1:0];
      for (int v = 0; v < 4; v++) begin
        for (int i = 0; i < X2; i++) din2[i] = 2'($urandom);
        #1;
        r = 0;
        for (int i = 0; i < X2; i++) if (sel[i]) begin
          lane = (off + r) % M2;
          checks++;
          if (dout2[lane] !== din2[i]) begin
            failures++;
            if (failures < 10) $display("FAIL hc2 t=%0d in=%0d lane=%0d", t, i, lane);
          end
          r++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
