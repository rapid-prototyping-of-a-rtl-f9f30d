// fsd_pkg: types, sizes and helper functions shared by the fixed-sphere
// decoder (FSD).
//
// The decoder detects a 4x4 MIMO system with 16-QAM symbols (M = 4 transmit
// antennas, P = 16 points). All complex quantities are 16-bit real and
// imaginary parts, as in the reference implementation. The fixed-point
// scaling is this design's own choice: data components (r, s_hat, s - s_hat)
// are two's complement with FRAC = 8 fractional bits (range +-128), so that
// the zero-forcing estimate does not clip on badly conditioned channels,
// where noise amplification makes it large; the pseudoinverse and the ratios
// u_ij/u_ii have CFRAC = 8 as well; u_ii^2 is unsigned with FRAC fractional
// bits. The host scales the pseudoinverse so that the
// zero-forcing estimate comes out in units where the 16-QAM points lie on the
// odd integers {-3,-1,+1,+3} per axis. Accumulated distances are unsigned,
// MW = 32 bits, with FRAC fractional bits.
//
// A QAM point is carried as a BPS-bit index {I axis index, Q axis index};
// axis index a = 0..L-1 (L = sqrt(P) levels per axis) stands for the odd
// level 2a - (L-1), e.g. -3, -1, +1, +3 for 16-QAM.
//
// P selects the constellation. The defaults are the 16-QAM decoder
// (P = 16, C = 4 cycles per vector, 4 lanes). Setting P = 64 gives the
// 64-QAM decoder (C = 8 cycles per vector, 8 lanes, 6 bits per symbol).
package fsd_pkg;

  localparam int M     = 4;     // transmit antennas = tree levels
  localparam int P     = 16;    // constellation size
  localparam int BPS   = $clog2(P);       // bits per symbol
  localparam int AB    = BPS / 2;         // bits per axis
  localparam int L     = 1 << AB;         // levels per axis
  localparam int W     = 16;    // bits per real/imaginary component
  localparam int FRAC  = 8;     // fractional bits of a data component
  localparam int CFRAC = 8;     // fractional bits of H_pinv and u_ij/u_ii
  localparam int MW    = 32;    // accumulated distance width
  localparam int C     = (P <= 16) ? 4 : 8;  // cycles per detected vector
  localparam int LANES = P / C;              // paths processed in parallel

  typedef logic signed [W-1:0] fx_t;
  typedef logic        [W-1:0] ufx_t;   // unsigned, used for u_ii^2
  typedef logic [MW-1:0]       metric_t;
  typedef logic [BPS-1:0]      sym_t;   // {I axis index, Q axis index}

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cplx_t;

  typedef cplx_t [M-1:0] cvec_t;       // one complex M-vector

  // Coefficients of one channel realisation, written by the host once per
  // frame: the pseudoinverse rows, the feedback ratios u_ij/u_ii (j > i) of
  // the Cholesky factor and the squared diagonal u_ii^2. Level i is array
  // index i-1; entries with j <= i of ratio are unused.
  typedef struct packed {
    cplx_t [M-1:0][M-1:0] hpinv;   // [row i][column j]
    cplx_t [M-1:0][M-1:0] ratio;   // [level i][level j], used for j > i
    ufx_t  [M-1:0]        uii2;    // [level i]
  } coef_t;

  // One tree path on its way down the levels.
  typedef struct packed {
    logic                 last;    // last slot of this vector
    logic [$clog2(C)-1:0] slot;    // cycle slot within the vector
    cplx_t [M-1:0]        shat;    // zero-forcing estimate of the vector
    cplx_t [M-1:0]        e;       // s_j - shat_j for the levels decided
    sym_t  [M-1:0]        sym;     // chosen point per level
    metric_t              acc;     // accumulated distance D
  } path_t;

  // Axis level, in FRAC units, of axis index a: 2a - (L-1).
  function automatic fx_t axis_level(input logic [AB-1:0] a);
    logic signed [AB+2:0] odd;
    odd = (AB+3)'(signed'({2'b0, a, 1'b0})) - (AB+3)'(L - 1);
    return fx_t'(odd) <<< FRAC;
  endfunction

  // Nearest axis index to x: floor(x/2) + L/2, clamped to 0..L-1, which puts
  // the decision thresholds at the even integers (-2, 0, +2 for 16-QAM).
  function automatic logic [AB-1:0] axis_slice(input fx_t x);
    logic signed [W-FRAC-1:0] q;
    q = (W-FRAC)'(x >>> (FRAC + 1)) + (W-FRAC)'(L / 2);
    if (q < 0)                          return '0;
    else if (q > (W-FRAC)'(L - 1))      return AB'(L - 1);
    else                                return AB'(q);
  endfunction

  function automatic cplx_t sym_point(input sym_t s);
    cplx_t p;
    p.re = axis_level(s[BPS-1:AB]);
    p.im = axis_level(s[AB-1:0]);
    return p;
  endfunction

  // Saturate a wide signed value to a component.
  function automatic fx_t sat_fx(input logic signed [47:0] v);
    if (v > 48'sd32767)       return fx_t'(16'sh7fff);
    else if (v < -48'sd32768) return fx_t'(16'sh8000);
    else                      return fx_t'(v);
  endfunction

  // Saturating complex subtraction a - b.
  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.re = sat_fx(48'(a.re) - 48'(b.re));
    r.im = sat_fx(48'(a.im) - 48'(b.im));
    return r;
  endfunction

  // Saturating addition of two unsigned distances.
  function automatic metric_t add_sat(input metric_t a, input metric_t b);
    logic [MW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[MW] ? '1 : s[MW-1:0];
  endfunction

  // Gray code of an axis index, a ^ (a >> 1): for 16-QAM
  // -3 -> 00, -1 -> 01, +1 -> 11, +3 -> 10.
  function automatic logic [AB-1:0] axis_gray(input logic [AB-1:0] a);
    return a ^ (a >> 1);
  endfunction

endpackage
