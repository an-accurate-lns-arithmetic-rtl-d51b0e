// lns_pkg: shared constants, types and elaboration-time table generators for the
// 32-bit logarithmic number system (LNS) arithmetic unit.
//
// Number format: a value is <s, e>, meaning (-1)^s * 2^e, where e is a 31-bit
// two's-complement fixed-point number with 8 integer and F = 23 fraction bits.
// A 32-bit operand word is {s, e}. Zero has no encoding of its own.
//
// Addition and subtraction use e_c = e_a +/- g(r) with r = e_b - e_a <= 0 and
//   f_a(r) = log2(1 + 2^r)          (effective addition,   g = f_a)
//   f_s(r) = log2(1 - 2^r)          (effective subtraction, g = -f_s)
// The r axis is split into "segments" (intervals):
//   FN_A  i = 0..24 : -i-1 <= r < -i                   (f_a)
//   FN_S  i = 1..24 : -i-1 <= r < -i                   (f_s, far from r = 0)
//   FN_SS i = 0..23 : -2^-i <= r < -2^-(i+1)            (f_s near r = 0, "weak" error model)
// Each segment holds W = 2^SEG_LOG2W words, i.e. interpolation step h = width / W.
// The ROM stores g at the points x_j = x0 + j*h, j = -1 .. W, rounded to
// F_ROM = 26 fraction bits, packed P = 8 points per ROM word plus K = 2 extra
// (the interleaved-memory layout), so ROM word q of a segment holds
// x_{8q-1} .. x_{8q+8}. Every segment starts on a ROM word boundary.
//
// The word counts for i = 0..3 and i = 24 and the precisions (F_ROM, F_DP,
// multiplier sizes, P, K) follow the published design. The word counts of the
// middle intervals were rebuilt here by choosing, per interval, the largest
// power-of-two h whose second-order interpolation error at both interval ends is
// within 2^-27 (f_a), 2^-26 (f_s) and 2^-24 scaled by 2^-f_s (f_ss, weak model).
//
// The multiplier input shifts (SEG_SH1, SEG_SH2) are per-segment constants that
// keep as many significant bits as fit in the 19-bit (m1) and 12-bit (m2)
// multiplier inputs; they are derived here from the stored values.
package lns_pkg;

  // ---------------------------------------------------------------- formats
  localparam int F      = 23;          // fraction bits of the exponent
  localparam int I_W    = 8;           // integer bits of the exponent
  localparam int E_W    = I_W + F;     // 31-bit exponent
  localparam int WORD_W = 1 + E_W;     // 32-bit LNS word {sign, exponent}

  // ------------------------------------------------------- interpolator
  localparam int K      = 2;           // polynomial order
  localparam int P      = 8;           // interleaving factor
  localparam int LOG2P  = 3;
  localparam int NE     = P + K;       // stored values per ROM word
  localparam int F_ROM  = 26;          // fraction bits of stored values
  localparam int G_I    = 5;           // integer bits of stored |f| (max about 24.6)
  localparam int G_W    = G_I + F_ROM; // 31-bit stored value
  localparam int F_DP   = 30;          // fraction bits of the data path
  localparam int M1W    = 19;          // m1 width  (a1 + u*a2 operand)
  localparam int M1H    = 16;          // m1 height (u operand)
  localparam int M2W    = 12;          // m2 width  (a2 operand)
  localparam int M2H    = 16;          // m2 height (u operand)
  localparam int U_W    = 16;          // bits of u kept (equals the multiplier height)
  localparam int J_W    = 8;           // bits of the word index within a segment
  localparam int SH_W   = 5;           // bits of a multiplier shift amount
  localparam int DP_W   = 56;          // internal width of the interpolation sums

  // ----------------------------------------------------------- segments
  localparam int N_FA   = 25;
  localparam int N_FS   = 24;
  localparam int N_FSS  = 24;
  localparam int NSEG   = N_FA + N_FS + N_FSS;
  localparam int SEG_W  = 7;
  localparam int FAR_LIMIT = 25;       // for r < -25 the correction rounds to 0

  typedef enum logic [1:0] {FN_A = 2'd0, FN_S = 2'd1, FN_SS = 2'd2} fn_e;
  typedef enum logic [1:0] {OP_ADD = 2'd0, OP_SUB = 2'd1, OP_MUL = 2'd2, OP_DIV = 2'd3} op_e;

  typedef int seg_tab_t [NSEG];

  // log2 of the words per interval, segments in order FN_A 0..24, FN_S 1..24, FN_SS 0..23
  localparam seg_tab_t SEG_LOG2W = '{
    7,7,7,6,6,6,6,5,5,5,4,4,4,3,3,3,2,2,2,1,1,1,1,1,1,
    8,7,7,6,6,6,5,5,4,4,4,3,3,3,2,2,2,1,1,1,1,1,1,1,
    7,7,6,6,6,5,5,5,4,4,4,3,3,3,2,2,1,1,1,1,1,1,1,1};

  function automatic fn_e seg_fn(int s);
    if (s < N_FA) return FN_A;
    if (s < N_FA + N_FS) return FN_S;
    return FN_SS;
  endfunction

  // interval number i of segment s
  function automatic int seg_i(int s);
    if (s < N_FA) return s;
    if (s < N_FA + N_FS) return s - N_FA + 1;
    return s - N_FA - N_FS;
  endfunction

  // bits of r (below the interval start) that index points inside the interval
  function automatic int seg_pointbits(int s);
    if (seg_fn(s) != FN_SS) return F;
    return (seg_i(s) <= F - 1) ? F - 1 - seg_i(s) : 0;
  endfunction

  function automatic int seg_rom_words(int s);
    return ((1 << SEG_LOG2W[s]) + P - 1) / P;
  endfunction

  function automatic int seg_base(int s);
    int b = 0;
    for (int t = 0; t < s; t++) b += seg_rom_words(t);
    return b;
  endfunction

  localparam int ROM_WORDS = seg_base(NSEG);
  localparam int ADDR_W    = $clog2(ROM_WORDS);

  function automatic seg_tab_t build_base();
    seg_tab_t t;
    for (int s = 0; s < NSEG; s++) t[s] = seg_base(s);
    return t;
  endfunction
  localparam seg_tab_t SEG_BASE = build_base();

  // ------------------------------------------------- reference functions
  // 1 - 2^x for x < 0, with a series near 0 to keep relative precision
  function automatic real one_minus_pow2(real x);
    real y;
    y = x * $ln(2.0);
    if (y > -0.0625)
      return -(y + y*y/2.0 + y*y*y/6.0 + y*y*y*y/24.0 + y*y*y*y*y/120.0);
    return 1.0 - 2.0 ** x;
  endfunction

  // |f(x)|: log2(1 + 2^x) for FN_A, -log2(1 - 2^x) for FN_S / FN_SS
  function automatic real g_of(fn_e fn, real x);
    if (fn == FN_A) return $ln(1.0 + 2.0 ** x) / $ln(2.0);
    return -$ln(one_minus_pow2(x)) / $ln(2.0);
  endfunction

  function automatic real seg_x0(int s);
    if (seg_fn(s) == FN_SS) return -(2.0 ** (-seg_i(s)));
    return -real'(seg_i(s) + 1);
  endfunction

  function automatic real seg_h(int s);
    real width;
    width = (seg_fn(s) == FN_SS) ? 2.0 ** (-(seg_i(s) + 1)) : 1.0;
    return width / real'(1 << SEG_LOG2W[s]);
  endfunction

  // stored value of point j (-1 .. W) of segment s; unused slots hold 0
  function automatic logic [G_W-1:0] seg_value(int s, int j);
    real g;
    if (j > (1 << SEG_LOG2W[s])) return '0;
    g = g_of(seg_fn(s), seg_x0(s) + real'(j) * seg_h(s));
    return G_W'($rtoi(g * (2.0 ** F_ROM) + 0.5));
  endfunction

  // smallest shift that brings v into a signed field of 'bits' bits
  function automatic int fit_shift(longint v, int bits);
    int sh = 0;
    while ((v >> sh) >= (longint'(1) << (bits - 1))) sh++;
    return sh;
  endfunction

  // per-segment multiplier input shifts: which = 2 for m2 (a2), 1 for m1 (a1 + u*a2)
  function automatic seg_tab_t build_shift(int which);
    seg_tab_t t;
    for (int s = 0; s < NSEG; s++) begin
      longint gm, g0, gp, d, c, dmax, cmax;
      dmax = 0; cmax = 0;
      gm = longint'(seg_value(s, -1));
      g0 = longint'(seg_value(s, 0));
      for (int j = 0; j < (1 << SEG_LOG2W[s]); j++) begin
        gp = longint'(seg_value(s, j + 1));
        d  = gp - gm;  if (d < 0) d = -d;
        c  = gp + gm - 2 * g0;  if (c < 0) c = -c;
        if (d > dmax) dmax = d;
        if (c > cmax) cmax = c;
        gm = g0; g0 = gp;
      end
      // a2 in 2^-27 units equals the second difference c; |a1 + u*a2| <= (dmax + cmax) * 2^-27
      t[s] = (which == 2) ? fit_shift(cmax, M2W) : fit_shift((dmax + cmax) << 3, M1W);
    end
    return t;
  endfunction
  localparam seg_tab_t SEG_SH2 = build_shift(2);
  localparam seg_tab_t SEG_SH1 = build_shift(1);

endpackage
