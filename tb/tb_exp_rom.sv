// tb_exp_rom: reads all 2K words of the exponent ROM. For a normal input
// exponent the expected result exponent is taken from a double-precision
// evaluation of the function at significand 1.0 (fraction zero) or 1.5
// (fraction not zero), flushed to 0 below the normal range. Exponents 0 and
// 255 are checked against the zero, infinity and NaN rules, and the spare
// function code must give 255.
module tb_exp_rom;
  logic        clk = 1'b0;
  logic [10:0] addr;
  logic [7:0]  data;
  int checks = 0, failures = 0, cycles = 0;

  exp_rom dut (.addr(addr), .data(data));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_exp(input int fn, input int fz, input int e);
    real         v, r;
    logic [63:0] d;
    int          ex;
    if (fn == 3) return 255;
    if (e == 0) begin
      if (!fz) return 255;                      // denormal: NaN
      return (fn == 1) ? 0 : 255;               // sqrt 0 = 0, 1/0 = inf
    end
    if (e == 255) begin
      if (!fz) return 255;                      // NaN
      return (fn == 1) ? 255 : 0;               // sqrt inf = inf, 1/inf = 0
    end
    v = (fz ? 1.0 : 1.5) * $pow(2.0, real'(e - 127));
    case (fn)
      0: r = 1.0 / v;
      1: r = $sqrt(v);
      default: r = 1.0 / $sqrt(v);
    endcase
    d  = $realtobits(r);
    ex = int'(d[62:52]) - 1023 + 127;
    return (ex < 1) ? 0 : ex;
  endfunction

  initial begin
    int e;
    addr = '0;
    for (int a = 0; a < 2048; a++) begin
      @(posedge clk);
      addr = 11'(a);
      @(negedge clk);
      e = ref_exp(a >> 9, (a >> 8) & 1, a & 255);
      checks++;
      if (int'(data) != e) begin
        failures++;
        $display("FAIL addr=%h data=%0d expected %0d", addr, data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
