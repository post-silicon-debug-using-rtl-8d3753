// plc_model: behavioural model of the programmable logic core, for testbenches
// only (the real core is a commercial embedded FPGA fabric). It stands for
// one debug program loaded into the core:
//   * a transition counter per observe lane: every PLC clock (plc_ce_i) it
//     takes the frame of `ratio_i` samples per lane from the interface buffer
//     and adds the number of value changes, including the change from the last
//     sample of the previous frame, to that lane's count;
//   * an override generator: at every PLC clock it registers the override
//     word (value and enable per lane and slot) given by the environment,
//     standing for a control decision made inside the core.
// Counting runs while count_en_i is high; clear_i zeroes the counts.
module plc_model #(
  parameter int unsigned M     = 23,
  parameter int unsigned R_MAX = 4,
  parameter int unsigned RW    = 3
) (
  input  logic                    clk_i,
  input  logic                    plc_ce_i,
  input  logic [RW-1:0]           ratio_i,
  input  logic [M-1:0][R_MAX-1:0] obs_i,
  input  logic                    count_en_i,
  input  logic                    clear_i,
  output int unsigned             count_o [M],
  input  logic [M-1:0][R_MAX-1:0] force_val_i,
  input  logic [M-1:0][R_MAX-1:0] force_en_i,
  output logic [M-1:0][R_MAX-1:0] ctrl_val_o,
  output logic [M-1:0][R_MAX-1:0] ctrl_en_o
);
  logic [M-1:0] last_q;

  initial begin
    ctrl_val_o = '0;
    ctrl_en_o  = '0;
    last_q     = '0;
    foreach (count_o[q]) count_o[q] = 0;
  end

  always @(posedge clk_i) begin
    if (clear_i) begin
      foreach (count_o[q]) count_o[q] <= 0;
    end else if (plc_ce_i) begin
      for (int q = 0; q < M; q++) begin
        automatic logic prev = last_q[q];
        automatic int unsigned c = 0;
        for (int s = 0; s < int'(ratio_i); s++) begin
          if (obs_i[q][s] != prev) c++;
          prev = obs_i[q][s];
        end
        if (count_en_i) count_o[q] <= count_o[q] + c;
        last_q[q] <= prev;
      end
    end
    if (plc_ce_i) begin
      ctrl_val_o <= force_val_i;
      ctrl_en_o  <= force_en_i;
    end
  end
endmodule
