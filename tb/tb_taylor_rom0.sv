// tb_taylor_rom0: reads every word of ROM 0 and compares it with g(x)
// written out per function and parity (2/x, sqrt(x), sqrt(2x), 2/sqrt(x),
// sqrt(2/x)), scaled by 2^31. A word must be the truncation of that value;
// the value 2.0 must read as 0 (modulo 2) and the spare area as 0.
module tb_taylor_rom0;
  localparam int X_BITS = 9;
  localparam int DEPTH  = 1 << (X_BITS + 3);

  logic              clk = 1'b0;
  logic [X_BITS+2:0] addr;
  logic [31:0]       data;
  int checks = 0, failures = 0, cycles = 0;

  taylor_rom0 #(.X_BITS(X_BITS)) dut (.addr(addr), .data(data));

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
      0: return 2.0 / x;
      1: return par ? $sqrt(2.0 * x) : $sqrt(x);
      2: return par ? $sqrt(2.0 / x) : 2.0 / $sqrt(x);
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
      t = expected(a >> (X_BITS + 1), (a >> X_BITS) & 1, x) * 2147483648.0;
      checks++;
      if (t >= 4294967296.0 - 1e-3) begin
        if (data != 32'd0) begin
          failures++;
          $display("FAIL addr=%h data=%h expected 0 (2.0 modulo 2)", addr, data);
        end
      end else begin
        d = t - real'(data);
        if (d < -1e-4 || d >= 1.0 + 1e-4) begin
          failures++;
          $display("FAIL addr=%h data=%h expected %f", addr, data, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
