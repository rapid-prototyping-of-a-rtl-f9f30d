// fsd_cmult: pipelined fixed-point complex multiplier.
//
// p = a * b = (ac - bd) + j(bc + ad). Operand a is a coefficient (CFRAC
// fractional bits), b a data value (FRAC). The exact product is shifted right
// by CFRAC so the result has FRAC fractional bits, and saturated to 16 bits.
// The shift truncates towards minus infinity; that rounding is this design's
// choice. The pipeline always advances (no enable): the caller carries its
// own valid bits alongside.
//
// Two structures, both described by the reference implementation, give the
// same bits:
//   MULT3 = 0 (default): four real multipliers and two adders, latency 2.
//     Cycle 1 registers the four 16x16 products, cycle 2 the sum and
//     difference.
//   MULT3 = 1: three real multipliers and five adders, latency 3, using
//     (a+jb)(c+jd) = [a(c-d) + d(a-b)] + j[b(c+d) + d(a-b)].
//     Cycle 1 registers the three pre-additions, cycle 2 the three 16x17
//     products, cycle 3 the two post-additions.
// The latency is LAT = 2 + MULT3.
module fsd_cmult
  import fsd_pkg::*;
#(
  parameter bit MULT3 = 1'b0     // 1: three-multiplier form, one cycle longer
) (
  input  logic  clk,
  input  cplx_t a,       // coefficient, CFRAC fractional bits
  input  cplx_t b,       // data, FRAC fractional bits
  output cplx_t p        // a*b, 2 + MULT3 cycles after a and b
);
  logic signed [2*W+1:0] re_w, im_w;

  if (!MULT3) begin : g_mult4
    logic signed [2*W-1:0] ac_q, bd_q, bc_q, ad_q;
    always_ff @(posedge clk) begin
      ac_q <= a.re * b.re;
      bd_q <= a.im * b.im;
      bc_q <= a.im * b.re;
      ad_q <= a.re * b.im;
    end
    always_comb begin
      re_w = (2*W+2)'(ac_q) - (2*W+2)'(bd_q);
      im_w = (2*W+2)'(bc_q) + (2*W+2)'(ad_q);
    end
  end else begin : g_mult3
    // a = ar + j ai, b = c + j d.
    logic signed [W-1:0]   ar_q, ai_q, d_q;
    logic signed [W:0]     cmd_q, cpd_q, amb_q;   // c-d, c+d, ar-ai
    logic signed [2*W:0]   m1_q, m2_q, m3_q;
    always_ff @(posedge clk) begin
      ar_q  <= a.re;
      ai_q  <= a.im;
      d_q   <= b.im;
      cmd_q <= (W+1)'(b.re) - (W+1)'(b.im);
      cpd_q <= (W+1)'(b.re) + (W+1)'(b.im);
      amb_q <= (W+1)'(a.re) - (W+1)'(a.im);
      m1_q  <= (2*W+1)'(ar_q) * (2*W+1)'(cmd_q);   // a(c-d)
      m2_q  <= (2*W+1)'(ai_q) * (2*W+1)'(cpd_q);   // b(c+d)
      m3_q  <= (2*W+1)'(d_q)  * (2*W+1)'(amb_q);   // d(a-b)
    end
    always_comb begin
      re_w = (2*W+2)'(m1_q) + (2*W+2)'(m3_q);
      im_w = (2*W+2)'(m2_q) + (2*W+2)'(m3_q);
    end
  end

  always_ff @(posedge clk) begin
    p.re <= sat_fx(48'(re_w >>> CFRAC));
    p.im <= sat_fx(48'(im_w >>> CFRAC));
  end
endmodule
