// tb_square_rom: reads all 256 words of ROM 3 and checks each against the
// top 8 bits of the 16-bit square of its address, plus a few known values.
module tb_square_rom;
  logic       clk = 1'b0;
  logic [7:0] y_hi;
  logic [7:0] sq;
  int checks = 0, failures = 0, cycles = 0;

  square_rom #(.IN_W(8), .OUT_W(8)) dut (.y_hi(y_hi), .sq(sq));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int e);
    @(posedge clk);
    y_hi = 8'(a);
    @(negedge clk);
    checks++;
    if (int'(sq) != e) begin
      failures++;
      $display("FAIL y_hi=%0d sq=%0d expected %0d", a, sq, e);
    end
  endtask

  initial begin
    y_hi = '0;
    for (int i = 0; i < 256; i++) check(i, (i * i) / 256);
    check(255, 254);
    check(128, 64);
    check(16, 1);
    check(15, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
