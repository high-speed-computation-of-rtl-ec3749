// zero_compare: the unit's 23-bit compare logic.
//
// Flags an input fraction of all zeros, that is a significand of exactly
// 1.0. The flag tells the exponent ROM that the reciprocal (and the
// reciprocal square root of an even exponent) is an exact power of two,
// and together with the exponent it separates zero and infinity from
// denormals and NaNs. Combinational.
module zero_compare #(
  parameter int unsigned W = 23         // fraction width (original design: 23)
) (
  input  logic [W-1:0] frac,
  output logic         is_zero
);
  assign is_zero = (frac == '0);
endmodule
