// fsd_pdu: partial distance unit for one tree level i (parameter LEVEL).
//
// The fixed-sphere decoder follows a fixed set of tree paths, level M first.
// This unit extends one path by one level, one path per clock cycle:
//   z_i = s_hat_i - sum_{j>i} (u_ij/u_ii) (s_j - s_hat_j)
//   d_i = u_ii^2 |s_i - z_i|^2,   D_i = D_{i+1} + d_i
// At the top level (LEVEL == M) z_M = s_hat_M and the candidate s_M is given
// from outside (all P points are searched there, one per path). At the lower
// levels a single candidate is kept: the point nearest z_i, which is the first
// point of the Schnorr-Euchner order, found by slicing each axis. This is the
// n_S = (1,1,1,16) distribution of the 4x4 16-QAM decoder. Other candidate
// counts below P (n_i between 2 and P-1) are not supported by this unit.
//
// The differences s_j - s_hat_j of the decided levels travel with the path
// (field e), so each level needs M-LEVEL complex multipliers, plus two real
// multipliers for |.|^2 and one for the u_ii^2 scaling.
//
// Timing: fully pipelined, one path in and one out per cycle. Latency is
// 3 cycles at the top level (subtract, square, scale) and 5 below it (two for
// the complex multipliers, then slice, square, scale). With MULT3 = 1 the
// complex multipliers use the three-multiplier form and the lower levels take
// 6 cycles; the results are identical. Distances saturate.
//
// MANHATTAN = 1 replaces |s_i - z_i|^2 by |re(s_i - z_i)| + |im(s_i - z_i)|,
// which removes the two squaring multipliers; the host then writes u_ii in
// place of u_ii^2, so d_i = u_ii (|re| + |im|). The reference design names this
// metric as a further multiplier saving that costs some detection
// performance; the scaling by u_ii is this design's choice.
module fsd_pdu
  import fsd_pkg::*;
#(
  parameter int LEVEL = M,         // 1..M, level M is detected first
  parameter bit MULT3 = 1'b0,      // complex multiplier structure
  parameter bit MANHATTAN = 1'b0   // 1: |re| + |im| instead of |.|^2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  path_t                in_path,
  input  sym_t                 cand,       // candidate s_M, top level only
  input  cplx_t [M-1:0][M-1:0] ratio,      // u_ij/u_ii
  input  ufx_t  [M-1:0]        uii2,       // u_ii^2 (u_ii if MANHATTAN)
  output logic                 out_valid,
  output path_t                out_path
);
  localparam int K   = LEVEL - 1;          // array index of this level
  localparam int NFB = M - LEVEL;          // feedback terms
  localparam int CL  = 2 + int'(MULT3);    // complex multiplier latency

  // Stage "decide": the path with this level's symbol, s_i - z_i and
  // s_i - s_hat_i.
  logic  dec_v;
  path_t dec_p;
  cplx_t dec_q;

  if (LEVEL == M) begin : g_top
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dec_v <= 1'b0;
      else        dec_v <= in_valid;
    end
    always_ff @(posedge clk) begin
      cplx_t e;
      e = csub(sym_point(cand), in_path.shat[K]);
      dec_p        <= in_path;
      dec_p.sym[K] <= cand;
      dec_p.e[K]   <= e;
      dec_q        <= e;
    end
  end else begin : g_low
    // CL cycles: feedback products (u_ij/u_ii)(s_j - s_hat_j).
    cplx_t [NFB-1:0] fb;
    for (genvar j = 0; j < NFB; j++) begin : g_fb
      fsd_cmult #(.MULT3(MULT3)) u_mul (
        .clk (clk),
        .a   (ratio[K][K+1+j]),
        .b   (in_path.e[K+1+j]),
        .p   (fb[j])
      );
    end

    logic  [CL-1:0] v_d;
    path_t          p_d [CL];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_d   <= '0;
        dec_v <= 1'b0;
      end else begin
        v_d   <= {v_d[CL-2:0], in_valid};
        dec_v <= v_d[CL-1];
      end
    end
    always_ff @(posedge clk) begin
      p_d[0] <= in_path;
      for (int k = 1; k < CL; k++) p_d[k] <= p_d[k-1];
    end

    // z_i and the nearest point.
    cplx_t z;
    sym_t  s;
    always_comb begin
      logic signed [W+3:0] zre, zim;
      zre = (W+4)'(p_d[CL-1].shat[K].re);
      zim = (W+4)'(p_d[CL-1].shat[K].im);
      for (int j = 0; j < NFB; j++) begin
        zre -= (W+4)'(fb[j].re);
        zim -= (W+4)'(fb[j].im);
      end
      z.re = sat_fx(48'(zre));
      z.im = sat_fx(48'(zim));
      s    = {axis_slice(z.re), axis_slice(z.im)};
    end

    always_ff @(posedge clk) begin
      dec_p        <= p_d[CL-1];
      dec_p.sym[K] <= s;
      dec_p.e[K]   <= csub(sym_point(s), p_d[CL-1].shat[K]);
      dec_q        <= csub(sym_point(s), z);
    end
  end

  // Stage "square": |s_i - z_i|^2 (or |re| + |im|), FRAC fractional bits.
  logic                  sq_v;
  path_t                 sq_p;
  logic [2*W-FRAC:0]     sq;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sq_v <= 1'b0;
    else        sq_v <= dec_v;
  end
  if (!MANHATTAN) begin : g_sq
    always_ff @(posedge clk) begin
      logic signed [2*W-1:0] rr, ii;
      logic        [2*W:0]   s2;
      rr   = dec_q.re * dec_q.re;
      ii   = dec_q.im * dec_q.im;
      s2   = (2*W+1)'($unsigned(rr)) + (2*W+1)'($unsigned(ii));
      sq   <= s2[2*W:FRAC];
    end
  end else begin : g_abs
    always_ff @(posedge clk) begin
      logic signed [W:0] xr, xi;
      logic        [W:0] ar, ai;
      xr = (W+1)'(dec_q.re);
      xi = (W+1)'(dec_q.im);
      ar = (xr < 0) ? $unsigned(-xr) : $unsigned(xr);
      ai = (xi < 0) ? $unsigned(-xi) : $unsigned(xi);
      sq <= (2*W-FRAC+1)'(ar) + (2*W-FRAC+1)'(ai);
    end
  end
  always_ff @(posedge clk) begin
    sq_p <= dec_p;
  end

  // Stage "scale": d_i = u_ii^2 |s_i - z_i|^2, D_i = D_{i+1} + d_i.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= sq_v;
  end
  always_ff @(posedge clk) begin
    logic [3*W-FRAC:0] d_full;
    metric_t           d;
    d_full = (3*W-FRAC+1)'(sq) * (3*W-FRAC+1)'(uii2[K]);
    d      = (d_full[3*W-FRAC:FRAC] > (3*W-2*FRAC+1)'({MW{1'b1}})) ?
             '1 : MW'(d_full[3*W-FRAC:FRAC]);
    out_path     <= sq_p;
    out_path.acc <= add_sat(sq_p.acc, d);
  end
endmodule
