// tb_taylor_rom2: reads every word of ROM 2 and compares it with |g''(x)/2|
// written out per function and parity (2/x^3, x^-1.5/8, sqrt 2 x^-1.5/8,
// 0.75 x^-2.5, 3 sqrt 2 x^-2.5/8), truncated and saturated at 0xFF: Q1.7
// for the reciprocal, Q0.8 for the two root functions, whose values stay
// below 1. A second instance checks the 7-bit variant (Q1.6 / Q0.7).
module tb_taylor_rom2;
  localparam int X_BITS = 9;
  localparam int DEPTH  = 1 << (X_BITS + 3);

  logic              clk = 1'b0;
  logic [X_BITS+2:0] addr;
  logic [7:0]        data;
  logic [6:0]        data7;
  int checks = 0, failures = 0, cycles = 0;

  taylor_rom2 #(.X_BITS(X_BITS), .DATA_W(8)) dut  (.addr(addr), .data(data));
  taylor_rom2 #(.X_BITS(X_BITS), .DATA_W(7)) dut7 (.addr(addr), .data(data7));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (2 * DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(input int fn, input int par, input real x);
    real r15, r25;
    r15 = 1.0 / (x * $sqrt(x));
    r25 = r15 / x;
    case (fn)
      0: return 2.0 / (x * x * x);
      1: return par ? $sqrt(2.0) * r15 / 8.0 : r15 / 8.0;
      2: return par ? 3.0 * $sqrt(2.0) * r25 / 8.0 : 0.75 * r25;
      default: return 0.0;
    endcase
  endfunction

  task automatic check(input real t_in, input real full, input int got);
    real t, d;
    t = (t_in > full) ? full : t_in;
    d = t - real'(got);
    checks++;
    if (d < -1e-4 || d >= 1.0 + 1e-4) begin
      failures++;
      $display("FAIL addr=%h data=%0d expected %f", addr, got, t);
    end
  endtask

  initial begin
    real x, g;
    addr = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk);
      addr = (X_BITS + 3)'(a);
      @(negedge clk);
      x = 1.0 + real'(a % (1 << X_BITS)) / real'(1 << X_BITS);
      g = expected(a >> (X_BITS + 1), (a >> X_BITS) & 1, x);
      if ((a >> (X_BITS + 1)) == 1 || (a >> (X_BITS + 1)) == 2) g = 2.0 * g;
      check(g * 128.0, 255.0, int'(data));
      check(g * 64.0, 127.0, int'(data7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
