// lns_pkg -- shared format, widths and table generators of the LNS add/subtract unit.
//
// Number format (32 bits, as in the 32-bit co-transformation ALUs this design is
// measured against): bit 31 is the sign of the real value, bits 30:0 hold log2|x| as a
// two's-complement fixed-point number with 8 integer bits (sign included) and 23
// fraction bits. The most negative log code, 31'h4000_0000, is reserved for zero.
// The choice of zero code and the saturation rules are this design's own.
//
// Inside the unit every logarithm carries GUARD = 4 extra fraction bits (the guard-bit
// count the design selects for its second-degree Newton interpolator), so the working
// resolution is 2^-27.
//
// The addition function Fa(r) = log2(1 + 2^-r) and the subtraction function
// Fs(r) = log2(1 - 2^-r) are interpolated on r in [0, 32) over power-of-two segments,
// 256 intervals each:
//   segment 0: [0,1)   segment 1: [1,2)   segment 2: [2,4)
//   segment 3: [4,8)   segment 4: [8,16)  segment 5: [16,32)
// Addition uses all six segments, subtraction segments 2..5 (0 < r < 2 is handled by
// co-transformation). Segment 5 has no second-degree (S) table.
//
// The table contents are computed at elaboration by the constant functions below
// from the formulas given next to each one, so no data files are needed.
package lns_pkg;

  // ---------------------------------------------------------------- format
  localparam int unsigned FRAC     = 23;            // fraction bits of the stored log
  localparam int unsigned INTB     = 8;             // integer bits of the stored log
  localparam int unsigned LOGW     = INTB + FRAC;   // 31-bit log field
  localparam int unsigned GUARD    = 4;             // guard bits of the interpolator
  localparam int unsigned W        = FRAC + GUARD;  // working fraction bits (27)
  localparam int unsigned RW       = 5 + W;         // interpolator argument: r in [0,32), 5.27
  localparam int unsigned IDXW     = 8;             // 256 words per segment
  localparam int unsigned NSEG     = 6;             // power-of-two segments of r in [0,32)
  localparam int unsigned TW       = W - 4;         // interval fraction t, 23 bits

  // table word widths (signed two's complement, 2^-27 units)
  localparam int unsigned FW       = W + 2;         // F = f(r0): |f| <= 1
  localparam int unsigned DW       = 22;            // D = f(r1) - f(r0): |D| < 2^-8
  localparam int unsigned SW       = 14;            // S = (f(r2) - 2 f(r1) + f(r0)) / 2
  localparam int unsigned CW       = W + 6;         // co-transformation words: |F| < 24

  // working sum width: a log with W fraction bits plus headroom
  localparam int unsigned XW       = LOGW + GUARD + 2;

  typedef logic [31:0]             lns_t;           // packed LNS number
  typedef logic signed [XW-1:0]    xlog_t;          // working log, W fraction bits
  typedef logic [RW-1:0]           rarg_t;          // interpolator argument
  typedef logic signed [FW-1:0]    fval_t;          // interpolated F(r)
  typedef logic signed [CW-1:0]    cval_t;          // co-transformation table word

  localparam logic [LOGW-1:0] ZERO_LOG = {1'b1, {(LOGW-1){1'b0}}};
  localparam logic [LOGW-1:0] MAX_LOG  = {1'b0, {(LOGW-1){1'b1}}};
  localparam logic [LOGW-1:0] MIN_LOG  = {1'b1, {(LOGW-2){1'b0}}, 1'b1};

  typedef enum logic {FUNC_ADD = 1'b0, FUNC_SUB = 1'b1} func_e;

  // ---------------------------------------------------------------- real helpers
  localparam real LN2   = 0.6931471805599453;
  localparam real SCALE = 134217728.0;              // 2^W

  function automatic real log2r(input real x);
    return $ln(x) / LN2;
  endfunction

  // 2^x - 1, accurate for small x
  function automatic real pow2m1(input real x);
    real y;
    y = x * LN2;
    if (y < 1.0e-3 && y > -1.0e-3)
      return y * (1.0 + y / 2.0 * (1.0 + y / 3.0 * (1.0 + y / 4.0 * (1.0 + y / 5.0))));
    return $exp(y) - 1.0;
  endfunction

  // Fa(r) = log2(1 + 2^-r), Fs(r) = log2(1 - 2^-r) = log2(2^r - 1) - r
  function automatic real fr(input func_e fn, input real r);
    if (fn == FUNC_ADD) return log2r(1.0 + $pow(2.0, -r));
    return log2r(pow2m1(r)) - r;
  endfunction

  // lower end and interval width of segment g
  function automatic real seg_base(input int g);
    return (g == 0) ? 0.0 : $pow(2.0, real'(g - 1));
  endfunction
  function automatic real seg_step(input int g);
    return (g <= 1) ? 1.0 / 256.0 : $pow(2.0, real'(g - 1)) / 256.0;
  endfunction

  function automatic longint scaled(input real x);
    return longint'(x * SCALE);                     // round to nearest
  endfunction

  // Newton divided-difference coefficients on the grid r0, r1 = r0 + h, r2 = r0 + 2h,
  // scaled by h and h^2 so that f(r0 + t h) = F + D t + S t (t - 1), 0 <= t < 1:
  //   F = f(r0),  D = h * Df0 = f(r1) - f(r0),  S = h^2 * D2f0 = (f(r2) - 2 f(r1) + f(r0)) / 2
  function automatic longint ndd_coef(input func_e fn, input int g, input int k, input int which);
    real h, r0, y0, y1, y2;
    h  = seg_step(g);
    r0 = seg_base(g) + real'(k) * h;
    y0 = fr(fn, r0);
    y1 = fr(fn, r0 + h);
    y2 = fr(fn, r0 + 2.0 * h);
    case (which)
      0:       return scaled(y0);
      1:       return scaled(y1 - y0);
      default: return scaled((y2 - 2.0 * y1 + y0) / 2.0);
    endcase
  endfunction

  // co-transformation tables: log2(2^x - 1) for the three 8-bit fields of r in (0,2)
  //   F1[a] : x = a * 2^-7      F2[b] : x = b * 2^-15      F3[c] : x = c * 2^-23
  // word 0 of each table is never read and holds 0.
  function automatic longint cot_coef(input int tab, input int k);
    real x;
    if (k == 0) return 0;
    x = real'(k) * $pow(2.0, -7.0 - 8.0 * real'(tab));
    return scaled(log2r(pow2m1(x)));
  endfunction

endpackage
