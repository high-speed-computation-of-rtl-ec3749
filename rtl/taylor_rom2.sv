// taylor_rom2: ROM 2 of the unary unit, the magnitude of half the second
// derivative, |g''(x)/2|.
//
// Addressed like ROM 0 by {function, parity, x}; with the default X_BITS = 9
// and DATA_W = 8 it is 4K x 8 as in the unit's block diagram. A word is
// |g''(x)/2| as unsigned fixed point, truncated: Q1.7 (at 8 bits) for the
// reciprocal, whose values reach 2, and Q0.8 for the two root functions,
// whose values stay below 0.75 (see unary_pkg::fine2). Words saturate at the
// largest code; only the reciprocal's value 2 at x = 1 does. The term is positive for the reciprocal and the reciprocal
// square root and negative for the square root; the second adder applies the
// sign. DATA_W = 7 gives the 7-bit variant the original study also
// evaluates: the same words with their last bit dropped.
// The spare area holds zeros.
//
// Interface: combinational read, filled at start-up from unary_pkg.
module taylor_rom2
  import unary_pkg::*;
#(
  parameter int unsigned X_BITS = 9,    // table index bits (original design: 9)
  parameter int unsigned DATA_W = 8     // word width (original design: 8)
) (
  input  logic [X_BITS+2:0]  addr,      // {function[1:0], parity, x[X_BITS-1:0]}
  output logic [DATA_W-1:0]  data       // |g''(x)/2|, Q1.(DATA_W-1) or Q0.DATA_W
);
  localparam int unsigned DEPTH = 1 << (X_BITS + 3);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      mem[a] = DATA_W'(fix_sat(taylor_g2(2'(a >> (X_BITS + 1)), 1'((a >> X_BITS) & 1),
                                         index_to_x(a % (1 << X_BITS), X_BITS)),
                               DATA_W - 1 + int'(fine2(2'(a >> (X_BITS + 1)))), DATA_W));
    end
  end

  assign data = mem[addr];

endmodule
