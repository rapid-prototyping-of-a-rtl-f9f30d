// fsd_msu: minimum search unit.
//
// The decoder ends every one of its N_S = P paths at level 1 with an
// accumulated distance D_1 = |U(s - s_hat)|^2; the detected vector is the path
// with the smallest one. Paths arrive LANES at a time, over C = P/LANES
// consecutive cycles per vector (slot 0 .. C-1, the last one flagged).
// Stage 1 picks the smallest of the LANES paths with a comparator tree;
// stage 2 keeps a running minimum across the slots and, on the last slot,
// outputs the winner. Ties go to the lower lane and the earlier slot (the
// lower candidate index); that rule is this design's choice.
//
// Timing: one vector every C cycles, fully pipelined; out_valid pulses two
// cycles after the last slot of a vector entered.
module fsd_msu
  import fsd_pkg::*;
#(
  parameter int NL = LANES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  path_t [NL-1:0]     in_path,
  output logic               out_valid,
  output sym_t  [M-1:0]      out_sym,
  output metric_t            out_acc
);
  // Comparator tree over the lanes (sequential scan, strict less-than keeps
  // the lowest index among equals).
  path_t best_lane;
  always_comb begin
    best_lane = in_path[0];
    for (int l = 1; l < NL; l++)
      if (in_path[l].acc < best_lane.acc) best_lane = in_path[l];
  end

  logic  s1_v;
  path_t s1_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= in_valid;
  end
  always_ff @(posedge clk) s1_p <= best_lane;

  // Running minimum over the slots of one vector.
  sym_t [M-1:0] run_sym;
  metric_t      run_acc;
  sym_t [M-1:0] win_sym;
  metric_t      win_acc;
  always_comb begin
    if (s1_p.slot == '0 || s1_p.acc < run_acc) begin
      win_sym = s1_p.sym;
      win_acc = s1_p.acc;
    end else begin
      win_sym = run_sym;
      win_acc = run_acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_v && s1_p.last;
  end
  always_ff @(posedge clk) begin
    if (s1_v) begin
      run_sym <= win_sym;
      run_acc <= win_acc;
      if (s1_p.last) begin
        out_sym <= win_sym;
        out_acc <= win_acc;
      end
    end
  end
endmodule
