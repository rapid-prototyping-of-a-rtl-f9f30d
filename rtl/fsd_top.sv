// fsd_top: fixed-throughput fixed-sphere decoder (FSD) for a 4x4 MIMO system
// with 16-QAM.
//
// Instead of the variable-length depth-first search of a sphere decoder, the
// FSD follows a fixed set of N_S = n_1*n_2*n_3*n_4 = 1*1*1*16 tree paths:
// every one of the P = 16 points at the first detected level (level M) and,
// below it, only the point nearest the decision-feedback centre z_i. The
// detected vector is the path with the smallest accumulated distance. Because
// the search is fixed, the whole decoder is one pipeline:
//
//   host_if -> ZFU -> issue -> LANES x (PDU 4 -> PDU 3 -> PDU 2 -> PDU 1)
//           -> MSU -> DU -> host_if
//
// The zero-forcing unit (ZFU) forms s_hat = H_pinv r; the issue stage hands
// the 16 top-level candidates to LANES = 4 parallel path pipelines, four per
// cycle over C = 4 cycles; each partial distance unit (PDU) extends the
// paths by one level; the minimum search unit (MSU) picks the winner and the
// demapper unit (DU) turns it into 16 bits. One vector (16 bits) is detected
// every C = 4 cycles: 400 Mbit/s at 100 MHz. This split (16 ZFU multipliers
// plus 4 lanes x 36 PDU multipliers = 160) follows the reference design;
// the fixed-point formats, the host interface and the scheduling details
// are this design's own.
//
// Host side (frame-level, not in hardware): column ordering, pseudoinverse
// and Cholesky factor, written through cfg_* while busy is low.
// Interface: rx_* pushes received vectors (valid/ready), tx_* pops detected
// bit words (valid/ready). Into an idle decoder, a vector pushed at clock
// edge t can be popped at edge t+35: 1 (input buffer) + 7 (ZFU) + 1 (issue)
// + 18 (PDUs, 3+5+5+5) + 3 (the vector's last slot) + 2 (MSU) + 1 (DU)
// + 1 (output buffer) + 1 (host read).
//
// MULT3 = 1 builds every complex multiplier in the three-multiplier form
// (a resource reduction the reference design describes: 160 -> 132 real
// multipliers). The detected bits are identical; the latency grows by one
// cycle in the ZFU and in each of the three lower PDU levels, to 39.
// MANHATTAN = 1 makes every PDU use the Manhattan metric |re| + |im| (the
// next step the reference design names: 132 -> 100 multipliers together with
// MULT3 = 1). The host must then write u_ii, not u_ii^2, to addresses 32..35.
// This changes the detected vectors (slightly worse detection); the timing
// is unchanged.
//
// Setting P = 64 in fsd_pkg builds the 64-QAM decoder of the same family:
// C = 8 cycles per vector and 8 lanes (16 + 8 x 36 = 304 multipliers), 24-bit
// words, and a push-to-pop latency of 31 + C = 39 edges. The ZFU could take a
// vector every 4 cycles, so for C > M a small counter holds vectors back to
// one every C cycles.
module fsd_top
  import fsd_pkg::*;
#(
  parameter int IN_DEPTH  = 16,
  parameter int OUT_DEPTH = 16,
  parameter bit MULT3     = 1'b0,    // 1: three-multiplier complex multipliers
  parameter bit MANHATTAN = 1'b0     // 1: Manhattan distance in the PDUs
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [5:0]       cfg_addr,
  input  logic [2*W-1:0]   cfg_wdata,
  input  logic             rx_valid,
  output logic             rx_ready,
  input  cplx_t [M-1:0]    rx_r,
  output logic             tx_valid,
  input  logic             tx_ready,
  output logic [M*BPS-1:0] tx_bits,
  output logic             busy,
  output logic             stall
);
  localparam int SW = $clog2(C);

  coef_t coef;

  logic          dec_valid, dec_ready;
  cplx_t [M-1:0] dec_r;
  logic          res_valid;
  logic [M*BPS-1:0] res_bits;

  fsd_host_if #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_host_if (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .coef,
    .rx_valid, .rx_ready, .rx_r,
    .dec_valid, .dec_ready, .dec_r,
    .res_valid, .res_bits,
    .tx_valid, .tx_ready, .tx_bits,
    .busy, .stall
  );

  // Zero-forcing estimate.
  logic          shat_valid;
  cplx_t [M-1:0] shat;
  // The ZFU can take a vector every M cycles, the lanes one every C. With
  // C > M (64-QAM) a vector is released to the ZFU at most once every C
  // cycles; with C = M the ZFU's own pacing is already enough.
  logic zfu_valid, zfu_ready, gap_ok;
  if (C > M) begin : g_gap
    logic [SW-1:0] gap;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                       gap <= '0;
      else if (zfu_valid && zfu_ready)  gap <= SW'(C-1);
      else if (gap != '0)               gap <= gap - 1'b1;
    end
    assign gap_ok = (gap == '0);
  end else begin : g_nogap
    assign gap_ok = 1'b1;
  end
  assign zfu_valid = dec_valid && gap_ok;
  assign dec_ready = zfu_ready && gap_ok;

  fsd_zfu #(.MULT3(MULT3)) u_zfu (
    .clk, .rst_n,
    .in_valid(zfu_valid), .in_ready(zfu_ready), .r(dec_r),
    .hpinv(coef.hpinv),
    .out_valid(shat_valid), .shat(shat)
  );

  // Issue: slot k sends top-level candidates k*LANES .. k*LANES+LANES-1.
  // The ZFU delivers at most one vector every C cycles, so a vector's C
  // slots never overlap the next one.
  cplx_t [M-1:0] hold;
  logic          issuing;
  logic [SW-1:0] slot;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      slot    <= '0;
    end else if (shat_valid) begin
      issuing <= 1'b1;
      slot    <= '0;
    end else if (issuing) begin
      if (slot == SW'(C-1)) issuing <= 1'b0;
      else                  slot    <= slot + 1'b1;
    end
  end
  always_ff @(posedge clk) begin
    if (shat_valid) hold <= shat;
  end

  a_issue_spacing: assert property (@(posedge clk) disable iff (!rst_n)
      shat_valid |-> !issuing || slot == SW'(C-1))
    else $error("fsd_top: new estimate before the previous one was issued");

  // LANES path pipelines, each a chain of PDUs from level M down to 1.
  logic  [LANES-1:0] lane_v;
  path_t [LANES-1:0] lane_p;
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic  [M:0] v;
    path_t [M:0] p;
    always_comb begin
      p[M]      = '0;
      p[M].shat = hold;
      p[M].slot = slot;
      p[M].last = (slot == SW'(C-1));
    end
    assign v[M] = issuing;
    for (genvar i = M; i >= 1; i--) begin : g_lvl
      fsd_pdu #(.LEVEL(i), .MULT3(MULT3), .MANHATTAN(MANHATTAN)) u_pdu (
        .clk, .rst_n,
        .in_valid (v[i]),
        .in_path  (p[i]),
        .cand     (sym_t'(slot * LANES + l)),
        .ratio    (coef.ratio),
        .uii2     (coef.uii2),
        .out_valid(v[i-1]),
        .out_path (p[i-1])
      );
    end
    assign lane_v[l] = v[0];
    assign lane_p[l] = p[0];
  end

  // Minimum search and demapping.
  logic         min_valid;
  sym_t [M-1:0] min_sym;
  metric_t      min_acc;
  fsd_msu u_msu (
    .clk, .rst_n,
    .in_valid (lane_v[0]),
    .in_path  (lane_p),
    .out_valid(min_valid),
    .out_sym  (min_sym),
    .out_acc  (min_acc)
  );

  fsd_du u_du (
    .clk, .rst_n,
    .in_valid (min_valid),
    .in_sym   (min_sym),
    .out_valid(res_valid),
    .out_bits (res_bits)
  );
endmodule
