// taylor_rom0: ROM 0 of the unary unit, the zeroth Taylor term g(x).
//
// One word per area and table index: the address is {function, parity, x},
// where x is the top X_BITS fraction bits of the operand significand, so with
// the default X_BITS = 9 the ROM is 4K x 32 as in the unit's block diagram.
// A word is g(x) as unsigned fixed point Q1.31, truncated. The value 2.0
// (reciprocal and even-exponent reciprocal square root at x = 1) wraps to 0;
// the adders work modulo 2, so the correction terms still land on the right
// fraction and the exponent ROM supplies the exponent.
// The spare function area (code 3) holds zeros.
//
// Interface: combinational read, data follows addr with no clock. The
// contents are filled at start-up from the formulas in unary_pkg, which is
// how an FPGA or a ROM generator would take them.
module taylor_rom0
  import unary_pkg::*;
#(
  parameter int unsigned X_BITS = 9     // table index bits (original design: 9)
) (
  input  logic [X_BITS+2:0] addr,       // {function[1:0], parity, x[X_BITS-1:0]}
  output logic [ACC_W-1:0]  data        // g(x), Q1.31 modulo 2
);
  localparam int unsigned DEPTH = 1 << (X_BITS + 3);

  logic [ACC_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      mem[a] = ACC_W'(fix_sat(taylor_g0(2'(a >> (X_BITS + 1)), 1'((a >> X_BITS) & 1),
                                        index_to_x(a % (1 << X_BITS), X_BITS)),
                              ACC_W - 1, ACC_W + 1));
    end
  end

  assign data = mem[addr];

endmodule
