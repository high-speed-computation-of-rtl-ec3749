// result_pack: output stage of the unary unit.
//
// Joins the result sign, the exponent from the exponent ROM and the 23
// fraction bits from the second adder into an IEEE single-precision word.
// A NaN flag gives the quiet NaN 0x7FC00000. An exponent of 0 or 255 from
// the exponent ROM marks a zero or infinite result; its fraction is forced
// to zero so that the Taylor sum cannot turn it into a denormal or a NaN.
// The original design says zero and infinity come from the exponent ROM and that
// NaN and denormal operands give NaN; forcing the fraction here is this
// design's way to make that exact. Combinational.
module result_pack
  import unary_pkg::*;
(
  input  logic        sign,
  input  logic [7:0]  exp,
  input  logic [22:0] frac,
  input  logic        nan,
  output logic [31:0] result
);
  always_comb begin
    if (nan)
      result = QNAN;
    else if (exp == 8'h00 || exp == 8'hFF)
      result = {sign, exp, 23'd0};
    else
      result = {sign, exp, frac};
  end
endmodule
