// unary_unit: IEEE single-precision reciprocal, square root and reciprocal
// square root by a second-order Taylor expansion from look-up tables.
//
// The operand v = (-1)^s * 2^(e-127) * 1.f is split as in the original
// block diagram. The top X_BITS fraction bits form x, the rest form y, so
// the significand is z = x + y with 0 <= y < 2^-X_BITS. With the function
// code and the parity line, x addresses three ROMs holding g(x), |g'(x)| and
// |g''(x)/2| (g is the function scaled into [1, 2], see unary_pkg). ROM 3
// squares the top 8 bits of y. Then
//
//   sum = ROM0 -/+ (y * ROM1) +/- (ROM2 * ROM3)      (two 32-bit adders, Q1.31)
//
// Each product is aligned to the adders by a fixed shift, one bit more for
// the functions whose ROM 1 or ROM 2 words carry an extra fraction bit.
//
// and bits 30..8 of the sum are the result fraction, truncated. Meanwhile
// the exponent ROM maps {function, fraction == 0, e} to the result exponent,
// and unary_ctrl / result_pack handle signs, zero, infinity and NaN.
//
// Function codes: 0 reciprocal, 1 square root, 2 reciprocal square root,
// 3 spare (returns NaN). The error is at most one unit in the last place
// against the truncated exact result, with the last bit wrong for about 4 %
// (square root) to 9 % (reciprocal square root) of operands at the default sizes.
//
// Timing: purely combinational from v and fn to result, as in the original design,
// which uses flow-through ROMs, multipliers and adders; register it outside
// if a clocked pipeline is wanted.
//
// Sizes follow the original block diagram: x 9 bits, y 14 bits, ROMs 0-2
// 4K words of 32, 16 and 8 bits, ROM 3 256 x 8, exponent ROM 2K x 8.
// X_BITS = 10 gives the larger configuration the original study also evaluates.
module unary_unit
  import unary_pkg::*;
#(
  parameter int unsigned X_BITS  = 9,   // fraction bits of x (original design: 9)
  parameter int unsigned ROM1_W  = 16,  // ROM 1 word width (original design: 16)
  parameter int unsigned ROM2_W  = 8,   // ROM 2 word width (original design: 8)
  parameter int unsigned ROM3_IN = 8,   // ROM 3 address bits (original design: 8)
  parameter int unsigned ROM3_W  = 8    // ROM 3 word width (original design: 8)
) (
  input  logic [31:0] v,                // operand, IEEE single
  input  logic [1:0]  fn,               // function code
  output logic [31:0] result            // f(v), IEEE single
);
  localparam int unsigned Y_BITS = FRAC_W - X_BITS;
  // Alignment of the products to the Q1.31 adder format. y has weight
  // 2^-23 per unit, ROM1 2^-(ROM1_W-1), ROM2 2^-(ROM2_W-1) and ROM3
  // 2^(2*Y_BITS-46-ROM3_W); a ROM1 or ROM2 word with the scale line set
  // weighs half that.
  localparam int SH1 = int'(ROM1_W) - 9;
  localparam int SH2 = 14 + int'(ROM3_W) + int'(ROM2_W) - 2 * int'(Y_BITS);

  initial begin
    if (SH1 < 0 || SH2 < 0 || ROM3_IN > Y_BITS)
      $fatal(1, "unary_unit: unsupported table sizes");
  end

  // Operand fields
  logic              s;
  logic [7:0]        e;
  logic [22:0]       f;
  logic [X_BITS-1:0] x;
  logic [Y_BITS-1:0] y;

  assign s = v[31];
  assign e = v[30:23];
  assign f = v[22:0];
  assign x = f[22 -: X_BITS];
  assign y = f[Y_BITS-1:0];

  // Control
  logic fzero, parity, sub1, sub2, scale1, scale2, nan, res_sign;

  zero_compare #(.W(FRAC_W)) u_compare (
    .frac(f), .is_zero(fzero)
  );

  unary_ctrl u_ctrl (
    .sign(s), .exp(e), .fzero(fzero), .fn(fn),
    .parity(parity), .sub1(sub1), .sub2(sub2), .scale1(scale1), .scale2(scale2),
    .nan(nan), .res_sign(res_sign)
  );

  // Taylor tables
  logic [X_BITS+2:0] taddr;
  logic [ACC_W-1:0]  rom0;
  logic [ROM1_W-1:0] rom1;
  logic [ROM2_W-1:0] rom2;
  logic [ROM3_W-1:0] rom3;

  assign taddr = {fn, parity, x};

  taylor_rom0 #(.X_BITS(X_BITS)) u_rom0 (.addr(taddr), .data(rom0));
  taylor_rom1 #(.X_BITS(X_BITS), .DATA_W(ROM1_W)) u_rom1 (.addr(taddr), .data(rom1));
  taylor_rom2 #(.X_BITS(X_BITS), .DATA_W(ROM2_W)) u_rom2 (.addr(taddr), .data(rom2));
  square_rom #(.IN_W(ROM3_IN), .OUT_W(ROM3_W)) u_rom3 (
    .y_hi(y[Y_BITS-1 -: ROM3_IN]), .sq(rom3)
  );

  // Products
  logic [Y_BITS+ROM1_W-1:0] prod1;
  logic [ROM2_W+ROM3_W-1:0] prod2;
  logic [ACC_W-1:0]         term1, term2;

  mpy #(.A_W(Y_BITS), .B_W(ROM1_W)) u_mpy1 (.a(y), .b(rom1), .p(prod1));
  mpy #(.A_W(ROM2_W), .B_W(ROM3_W)) u_mpy2 (.a(rom2), .b(rom3), .p(prod2));

  // A word with one more fraction bit (scale line set) weighs half as much.
  assign term1 = ACC_W'(prod1 >> (SH1 + int'(scale1)));
  assign term2 = ACC_W'(prod2 >> (SH2 + int'(scale2)));

  // Sum of the terms
  logic [ACC_W-1:0] sum1, sum2;

  term_adder #(.W(ACC_W)) u_add1 (.a(rom0), .b(term1), .sub(sub1), .s(sum1));
  term_adder #(.W(ACC_W)) u_add2 (.a(sum1), .b(term2), .sub(sub2), .s(sum2));

  // Exponent and result. Of sum2 only bits 30..8 are used: bit 31 is the
  // hidden leading one and bits 7..0 lie below the result LSB, dropped by
  // truncation.
  logic [7:0] res_e;

  exp_rom u_exp_rom (.addr({fn, fzero, e}), .data(res_e));

  result_pack u_pack (
    .sign(res_sign), .exp(res_e), .frac(sum2[ACC_W-2 -: FRAC_W]), .nan(nan),
    .result(result)
  );

endmodule
