// tb_taylor_rom1: reads every word of ROM 1 and compares it with |g'(x)|
// written out per function and parity (2/x^2, 1/(2 sqrt x), 1/sqrt(2x),
// x^-1.5, x^-1.5/sqrt 2), truncated and saturated at 0xFFFF: Q0.16 for the
// square root, whose values stay below 1, Q1.15 for the others.
module tb_taylor_rom1;
  localparam int X_BITS = 9;
  localparam int DEPTH  = 1 << (X_BITS + 3);

  logic              clk = 1'b0;
  logic [X_BITS+2:0] addr;
  logic [15:0]       data;
  int checks = 0, failures = 0, cycles = 0;

  taylor_rom1 #(.X_BITS(X_BITS), .DATA_W(16)) dut (.addr(addr), .data(data));

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
    case (fn)
      0: return 2.0 / (x * x);
      1: return par ? 1.0 / $sqrt(2.0 * x) : 0.5 / $sqrt(x);
      2: return par ? 1.0 / ($sqrt(2.0) * x * $sqrt(x)) : 1.0 / (x * $sqrt(x));
      default: return 0.0;
    endcase
  endfunction

  initial begin
    real x, t, d;
    addr = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk);
      addr = (X_BITS + 3)'(a);
      @(negedge clk);
      x = 1.0 + real'(a % (1 << X_BITS)) / real'(1 << X_BITS);
      t = expected(a >> (X_BITS + 1), (a >> X_BITS) & 1, x)
          * (((a >> (X_BITS + 1)) == 1) ? 65536.0 : 32768.0);
      if (t > 65535.0) t = 65535.0;
      d = t - real'(data);
      checks++;
      if (d < -1e-4 || d >= 1.0 + 1e-4) begin
        failures++;
        $display("FAIL addr=%h data=%h expected %f", addr, data, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
