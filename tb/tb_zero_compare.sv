// tb_zero_compare: the 23-bit zero compare must flag only an all-zero
// fraction: checked with zero, every single set bit, all ones and random
// fractions.
module tb_zero_compare;
  logic        clk = 1'b0;
  logic [22:0] frac;
  logic        is_zero;
  int checks = 0, failures = 0, cycles = 0;

  zero_compare #(.W(23)) dut (.frac(frac), .is_zero(is_zero));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [22:0] f);
    @(posedge clk);
    frac = f;
    @(negedge clk);
    checks++;
    if (is_zero !== (f == 23'd0 ? 1'b1 : 1'b0)) begin
      failures++;
      $display("FAIL frac=%h is_zero=%b", f, is_zero);
    end
  endtask

  initial begin
    frac = '0;
    check(23'd0);
    for (int i = 0; i < 23; i++) check(23'(1) << i);
    check('1);
    for (int i = 0; i < 1000; i++) check(23'($urandom) >> ($urandom % 23));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
