// tb_mpy: both multiplier shapes of the unit, 14 x 16 and 8 x 8, against
// products computed in 64-bit integers; corner operands and random ones.
module tb_mpy;
  logic        clk = 1'b0;
  logic [13:0] a1;
  logic [15:0] b1;
  logic [29:0] p1;
  logic [7:0]  a2, b2;
  logic [15:0] p2;
  int checks = 0, failures = 0, cycles = 0;

  mpy #(.A_W(14), .B_W(16)) dut1 (.a(a1), .b(b1), .p(p1));
  mpy #(.A_W(8),  .B_W(8))  dut2 (.a(a2), .b(b2), .p(p2));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint x1, input longint y1, input longint x2, input longint y2);
    @(posedge clk);
    a1 = 14'(x1); b1 = 16'(y1); a2 = 8'(x2); b2 = 8'(y2);
    @(negedge clk);
    checks += 2;
    if (longint'(p1) != x1 * y1) begin
      failures++;
      $display("FAIL %0d * %0d = %0d", x1, y1, p1);
    end
    if (longint'(p2) != x2 * y2) begin
      failures++;
      $display("FAIL %0d * %0d = %0d", x2, y2, p2);
    end
  endtask

  initial begin
    a1 = '0; b1 = '0; a2 = '0; b2 = '0;
    check(0, 0, 0, 0);
    check(16383, 65535, 255, 255);
    check(1, 65535, 1, 255);
    check(16383, 1, 255, 1);
    for (int i = 0; i < 5000; i++)
      check($urandom % 16384, $urandom % 65536, $urandom % 256, $urandom % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
