// taylor_rom1: ROM 1 of the unary unit, the first-derivative magnitude |g'(x)|.
//
// Addressed like ROM 0 by {function, parity, x}; with the default X_BITS = 9
// and DATA_W = 16 it is 4K x 16 as in the unit's block diagram. A word is
// |g'(x)| as unsigned fixed point, truncated: Q1.15 (at 16 bits) for the
// reciprocal and the reciprocal square root, whose values reach 2 and 1,
// and Q0.16 for the square root, whose values stay below 0.71 (see
// unary_pkg::fine1). Words saturate at the largest code; only |g'(1)| = 2 of
// the reciprocal does. The sign of the term is not stored: it is negative
// for the reciprocal and the reciprocal square root, positive for the square
// root, and the first adder subtracts or adds accordingly. Storing a magnitude
// with a per-function sign is this design's choice; it keeps all 16 bits for
// precision. The spare area holds zeros.
//
// Interface: combinational read, filled at start-up from unary_pkg.
module taylor_rom1
  import unary_pkg::*;
#(
  parameter int unsigned X_BITS = 9,    // table index bits (original design: 9)
  parameter int unsigned DATA_W = 16    // word width (original design: 16)
) (
  input  logic [X_BITS+2:0]  addr,      // {function[1:0], parity, x[X_BITS-1:0]}
  output logic [DATA_W-1:0]  data       // |g'(x)|, Q1.(DATA_W-1) or Q0.DATA_W
);
  localparam int unsigned DEPTH = 1 << (X_BITS + 3);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      mem[a] = DATA_W'(fix_sat(taylor_g1(2'(a >> (X_BITS + 1)), 1'((a >> X_BITS) & 1),
                                         index_to_x(a % (1 << X_BITS), X_BITS)),
                               DATA_W - 1 + int'(fine1(2'(a >> (X_BITS + 1)))), DATA_W));
    end
  end

  assign data = mem[addr];

endmodule
