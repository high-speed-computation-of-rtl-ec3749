// unary_pkg: types, constants and table formulas shared by the unary
// arithmetic unit.
//
// The unit evaluates a function g of the 24-bit significand z = 1.f by a
// second-order Taylor expansion around x, the significand cut after its
// leading fraction bits: g(z) ~ g(x) + y*g'(x) + y^2*g''(x)/2 with y = z - x.
// Every function is written as g(z) = c * z^p, with the constant c chosen per
// "area" (function code and exponent parity) so that g stays in [1, 2]:
//
//   reciprocal            g = 2/z                     (c = 2,       p = -1)
//   square root, even k   g = sqrt(z)                 (c = 1,       p = 1/2)
//   square root, odd k    g = sqrt(2z)                (c = sqrt(2), p = 1/2)
//   recip. sqrt, even k   g = 2/sqrt(z)               (c = 2,       p = -1/2)
//   recip. sqrt, odd k    g = sqrt(2/z)               (c = sqrt(2), p = -1/2)
//
// where k = e - 127 is the unbiased input exponent. The scaling by 2 and by
// sqrt(2) follows the original design; the closed form c*z^p is this design's way to
// fill the tables. The ROMs hold magnitudes; the signs of the two correction
// terms depend only on the function and are applied by the adders.
//
// Table scale: a ROM 1 or ROM 2 word keeps one integer bit only where the
// values of its function reach 1 or more (ROM 1: reciprocal up to 2,
// reciprocal square root up to 1; ROM 2: reciprocal up to 2). Where they
// stay below 1 (ROM 1 of the square root, ROM 2 of both root functions) the
// word has one more fraction bit, and the unit shifts that product one bit
// further right. This choice is this design's; it reproduces the error
// rates the original study reports.
//
// The table contents are computed in double precision and truncated, as the
// original bit-accurate model does. The exponent map is pure integer logic.
package unary_pkg;

  // Function select. Code 3 is the spare area the original design reserves.
  typedef enum logic [1:0] {
    FN_RECIP = 2'd0,
    FN_SQRT  = 2'd1,
    FN_RSQRT = 2'd2,
    FN_SPARE = 2'd3
  } func_e;

  localparam int unsigned FRAC_W = 23;           // IEEE single fraction bits
  localparam int unsigned ACC_W  = 32;           // adder width, format Q1.31
  localparam logic [31:0] QNAN   = 32'h7FC0_0000;

  // c of g(z) = c * z^p for one area; 0 for the spare area.
  function automatic real area_c(input logic [1:0] fn, input logic parity);
    case (fn)
      FN_RECIP: return 2.0;
      FN_SQRT:  return parity ? $sqrt(2.0) : 1.0;
      FN_RSQRT: return parity ? $sqrt(2.0) : 2.0;
      default:  return 0.0;
    endcase
  endfunction

  // p of g(z) = c * z^p for one area.
  function automatic real area_p(input logic [1:0] fn);
    case (fn)
      FN_RECIP: return -1.0;
      FN_SQRT:  return 0.5;
      default:  return -0.5;
    endcase
  endfunction

  // Extra fraction bit of ROM 1 and ROM 2 words for a function (see above).
  function automatic logic fine1(input logic [1:0] fn);
    return fn == FN_SQRT;
  endfunction

  function automatic logic fine2(input logic [1:0] fn);
    return (fn == FN_SQRT) || (fn == FN_RSQRT);
  endfunction

  // Significand at table index i: x = 1 + i * 2^-xbits.
  function automatic real index_to_x(input int unsigned i, input int unsigned xbits);
    return 1.0 + real'(i) / (2.0 ** xbits);
  endfunction

  function automatic real abs_r(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // g(x), |g'(x)| and |g''(x)/2| for one area.
  function automatic real taylor_g0(input logic [1:0] fn, input logic parity, input real x);
    return area_c(fn, parity) * (x ** area_p(fn));
  endfunction

  function automatic real taylor_g1(input logic [1:0] fn, input logic parity, input real x);
    real p;
    p = area_p(fn);
    return abs_r(area_c(fn, parity) * p * (x ** (p - 1.0)));
  endfunction

  function automatic real taylor_g2(input logic [1:0] fn, input logic parity, input real x);
    real p;
    p = area_p(fn);
    return abs_r(area_c(fn, parity) * p * (p - 1.0) / 2.0 * (x ** (p - 2.0)));
  endfunction

  // Truncate a non-negative real to an unsigned fixed-point word with
  // frac_bits fraction bits, saturating at the largest code of width bits.
  function automatic longint unsigned fix_sat(input real v, input int unsigned frac_bits,
                                              input int unsigned width);
    real q;
    real top;
    q   = $floor(v * (2.0 ** frac_bits));
    top = (2.0 ** width) - 1.0;
    if (q > top) q = top;
    if (q < 0.0) q = 0.0;
    return longint'(q);
  endfunction

  // Result exponent for one exp ROM address: function code, the flag
  // "fraction is zero" and the biased input exponent e. Zero and infinity
  // results come out as 0 and 255; NaN cases give 255 (the fraction is
  // forced elsewhere). Results below the normal range flush to zero.
  function automatic logic [7:0] exp_map(input logic [1:0] fn, input logic fzero,
                                         input logic [7:0] e);
    int r;
    case (fn)
      FN_RECIP: begin
        if (e == 8'd0)        r = 255;                   // 1/0 = inf, denormal: NaN
        else if (e == 8'd255) r = fzero ? 0 : 255;       // 1/inf = 0, NaN
        else                  r = (fzero ? 254 : 253) - int'(e);
      end
      FN_SQRT: begin
        if (e == 8'd0)        r = fzero ? 0 : 255;       // sqrt(0) = 0, denormal: NaN
        else if (e == 8'd255) r = 255;                   // sqrt(inf) = inf, NaN
        else if (e[0])        r = (int'(e) + 127) / 2;   // k even
        else                  r = (int'(e) + 126) / 2;   // k odd
      end
      FN_RSQRT: begin
        if (e == 8'd0)        r = 255;                   // 1/sqrt(0) = inf
        else if (e == 8'd255) r = fzero ? 0 : 255;       // 1/sqrt(inf) = 0
        else if (e[0])        r = (fzero ? 127 : 126) - (int'(e) - 127) / 2;  // k even
        else                  r = 127 - (int'(e) - 126) / 2;                  // k odd
      end
      default: r = 255;                                  // spare: NaN
    endcase
    if (r < 0) r = 0;
    return 8'(r);
  endfunction

endpackage
