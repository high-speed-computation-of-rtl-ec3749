// unary_ctrl: control decode of the unary unit.
//
// Produces the parity line that selects the odd- or even-exponent area of
// the Taylor ROMs, the signs of the two correction terms, the NaN flag and
// the result sign.
//  - parity is 1 when the unbiased exponent e - 127 is odd, i.e. when the
//    biased exponent e is even. For the special exponents 0 and 255 it is
//    forced to 0, so that a zero or infinite operand (fraction 0, x = 1)
//    reads an area whose value at x = 1 has a zero fraction. The original design
//    says the parity line reflects the exponent parity and the special-case
//    status; this exact rule is this design's.
//  - sub1 (subtract the first-order term): reciprocal and reciprocal square
//    root, whose first derivative is negative. sub2 (subtract the
//    second-order term): square root, whose second derivative is negative.
//  - scale1, scale2: the ROM 1 / ROM 2 word of this function carries one
//    more fraction bit (unary_pkg::fine1 / fine2), so the product must be
//    shifted one bit further right.
//  - nan: denormal or NaN operand, a negative operand other than -0 for the
//    square root functions, or the spare function code.
//  - res_sign: the operand sign for the reciprocal; for the square root
//    functions 0, except that -0 keeps its sign (sqrt(-0) = -0,
//    1/sqrt(-0) = -inf, as IEEE 754 has it; the original design lists only +0).
// Combinational.
module unary_ctrl
  import unary_pkg::*;
(
  input  logic       sign,              // operand sign
  input  logic [7:0] exp,               // operand biased exponent
  input  logic       fzero,             // operand fraction is zero
  input  logic [1:0] fn,                // function code, see unary_pkg::func_e
  output logic       parity,
  output logic       sub1,
  output logic       sub2,
  output logic       scale1,
  output logic       scale2,
  output logic       nan,
  output logic       res_sign
);
  logic e_min, e_max, special, zero_in, root_fn;

  always_comb begin
    e_min    = (exp == 8'h00);
    e_max    = (exp == 8'hFF);
    special  = e_min | e_max;
    zero_in  = e_min & fzero;
    root_fn  = (fn == FN_SQRT) | (fn == FN_RSQRT);
    parity   = ~exp[0] & ~special;
    sub1     = (fn == FN_RECIP) | (fn == FN_RSQRT);
    sub2     = (fn == FN_SQRT);
    scale1   = fine1(fn);
    scale2   = fine2(fn);
    nan      = (fn == FN_SPARE) | (special & ~fzero) | (root_fn & sign & ~zero_in);
    res_sign = (fn == FN_RECIP) ? sign : (sign & zero_in);
  end

endmodule
