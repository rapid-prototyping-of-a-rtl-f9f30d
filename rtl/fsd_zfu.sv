// fsd_zfu: zero-forcing unit.
//
// Computes the least-squares estimate s_hat = H_pinv * r of one received
// vector, with H_pinv the pseudoinverse of the (ordered) channel matrix that
// the host supplies once per frame. Four complex multipliers (sixteen real
// multipliers) are shared over the C = 4 cycles a vector is allowed to take:
// in cycle k they form the four products of row k, which an adder tree sums
// into s_hat_k. The time-shared, row-per-cycle schedule is this design's
// choice; it matches the sixteen multipliers the reference implementation
// spends on this unit.
//
// Interface: in_valid/in_ready handshake for r; a new vector is accepted at
// most once every M cycles (in_ready falls while rows 0..M-2 are issued).
// out_valid pulses for one cycle with the complete s_hat vector; it is seen
// high at the seventh rising edge after the edge that accepted the vector
// (eighth with MULT3 = 1, the three-multiplier complex multipliers, which
// take one cycle longer). Sums saturate to 16 bits.
module fsd_zfu
  import fsd_pkg::*;
#(
  parameter bit MULT3 = 1'b0       // complex multiplier structure
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cplx_t [M-1:0]        r,
  input  cplx_t [M-1:0][M-1:0] hpinv,
  output logic                 out_valid,
  output cplx_t [M-1:0]        shat
);
  localparam int RW = $clog2(M);
  localparam int CL = 2 + int'(MULT3);   // complex multiplier latency

  cplx_t [M-1:0]  r_q;
  logic           active;
  logic [RW-1:0]  row;
  logic           accept;

  assign in_ready = !active || (row == RW'(M-1));
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      row    <= '0;
    end else if (accept) begin
      active <= 1'b1;
      row    <= '0;
    end else if (active) begin
      if (row == RW'(M-1)) active <= 1'b0;
      else                 row    <= row + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) r_q <= r;
  end

  // Row k: four products H_pinv[k][j] * r_j.
  cplx_t [M-1:0] prod;
  for (genvar j = 0; j < M; j++) begin : g_mul
    fsd_cmult #(.MULT3(MULT3)) u_mul (.clk(clk), .a(hpinv[row][j]), .b(r_q[j]), .p(prod[j]));
  end

  // Row tag follows the multiplier latency.
  logic [CL-1:0] v_d;
  logic [RW-1:0] row_d [CL];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= '0;
      for (int k = 0; k < CL; k++) row_d[k] <= '0;
    end else begin
      v_d      <= {v_d[CL-2:0], active};
      row_d[0] <= row;
      for (int k = 1; k < CL; k++) row_d[k] <= row_d[k-1];
    end
  end

  cplx_t sum;
  always_comb begin
    logic signed [W+2:0] sre, sim;
    sre = '0;
    sim = '0;
    for (int j = 0; j < M; j++) begin
      sre += (W+3)'(prod[j].re);
      sim += (W+3)'(prod[j].im);
    end
    sum.re = sat_fx(48'(sre));
    sum.im = sat_fx(48'(sim));
  end

  cplx_t [M-1:0] gather;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_d[CL-1] && (row_d[CL-1] == RW'(M-1));
    end
  end

  always_ff @(posedge clk) begin
    if (v_d[CL-1]) begin
      gather[row_d[CL-1]] <= sum;
      if (row_d[CL-1] == RW'(M-1)) begin
        shat <= gather;
        shat[M-1] <= sum;
      end
    end
  end
endmodule
