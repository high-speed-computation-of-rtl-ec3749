// mpy: unsigned array multiplier of the unary unit.
//
// The unit has two: y (14 bits) times ROM 1 (16 bits) for the first-order
// term, and ROM 2 (8 bits) times ROM 3 (8 bits) for the second-order term.
// The full product is returned; the unit picks the bits it needs.
// Combinational; the original design's parts are flow-through multipliers.
module mpy #(
  parameter int unsigned A_W = 14,      // first operand width
  parameter int unsigned B_W = 16       // second operand width
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] p
);
  assign p = (A_W + B_W)'(a) * (A_W + B_W)'(b);
endmodule
