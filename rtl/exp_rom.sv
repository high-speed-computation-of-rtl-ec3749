// exp_rom: the exponent ROM of the unary unit (2K x 8).
//
// Maps {function, fraction-is-zero, biased input exponent} to the biased
// result exponent. It negates the exponent for the reciprocal, halves it for
// the square root and does both for the reciprocal square root, and it
// absorbs the scaling by 2 that keeps every table value in [1, 2): for the
// reciprocal and for the reciprocal square root of an even exponent the
// result exponent is one lower unless the fraction is zero, which is why the
// 23-bit zero compare feeds this ROM. Inputs zero and infinity give result
// exponents 0 or 255; denormal, NaN and invalid inputs give 255 and the
// result stage forces the NaN fraction. Reciprocals that would underflow
// (input exponent 253 and up) flush to zero, which is this design's choice.
//
// Interface: combinational read; contents computed at start-up from
// unary_pkg::exp_map.
module exp_rom
  import unary_pkg::*;
(
  input  logic [10:0] addr,             // {function[1:0], fraction zero, exponent[7:0]}
  output logic [7:0]  data              // biased result exponent
);
  logic [7:0] mem [2048];

  initial begin
    for (int unsigned a = 0; a < 2048; a++) begin
      mem[a] = exp_map(2'(a >> 9), 1'((a >> 8) & 1), 8'(a));
    end
  end

  assign data = mem[addr];

endmodule
