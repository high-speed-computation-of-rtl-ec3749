// term_adder: the 32-bit adder that sums Taylor terms in the unary unit.
//
// s = a + b, or a - b when sub is set, modulo 2^W. The subtract input applies
// the sign of a correction term, since the ROMs store magnitudes; it is built
// the usual way, inverting b and setting the carry-in. Using an adder that
// can subtract is this design's choice. Combinational.
module term_adder #(
  parameter int unsigned W = 32         // adder width (original design: 32)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s
);
  assign s = a + (b ^ {W{sub}}) + W'(sub);
endmodule
