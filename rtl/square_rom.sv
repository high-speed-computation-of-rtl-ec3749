// square_rom: ROM 3 of the unary unit, the square of y.
//
// Only the top IN_W bits of y address it, and it returns the top OUT_W bits
// of their square: data = (y_hi * y_hi) >> (2*IN_W - OUT_W), truncated. With
// the defaults it is the 256 x 8 ROM of the unit's block diagram. Because y
// is below 2^-X_BITS, its square is tiny and a short word is enough for the
// second-order term.
//
// Interface: combinational read; contents computed at start-up.
module square_rom #(
  parameter int unsigned IN_W  = 8,     // address bits, top bits of y (original design: 8)
  parameter int unsigned OUT_W = 8      // word width (original design: 8)
) (
  input  logic [IN_W-1:0]  y_hi,
  output logic [OUT_W-1:0] sq
);
  localparam int unsigned DEPTH = 1 << IN_W;

  logic [OUT_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      mem[i] = OUT_W'((i * i) >> (2 * IN_W - OUT_W));
    end
  end

  assign sq = mem[y_hi];

endmodule
