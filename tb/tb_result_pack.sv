// tb_result_pack: the output stage must pass normal results through, give
// the quiet NaN when flagged, and clear the fraction of zero and infinite
// results. Random inputs plus the boundary exponents.
module tb_result_pack;
  logic        clk = 1'b0;
  logic        sign, nan;
  logic [7:0]  exp;
  logic [22:0] frac;
  logic [31:0] result;
  int checks = 0, failures = 0, cycles = 0;

  result_pack dut (.sign(sign), .exp(exp), .frac(frac), .nan(nan), .result(result));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit s, input logic [7:0] e, input logic [22:0] f, input bit n);
    logic [31:0] want;
    @(posedge clk);
    sign = s; exp = e; frac = f; nan = n;
    @(negedge clk);
    if (n) want = 32'h7FC0_0000;
    else if (e == 0 || e == 255) want = {s, e, 23'd0};
    else want = {s, e, f};
    checks++;
    if (result !== want) begin
      failures++;
      $display("FAIL s=%b e=%0d f=%h nan=%b: %h expected %h", s, e, f, n, result, want);
    end
  endtask

  initial begin
    sign = 0; exp = 0; frac = 0; nan = 0;
    check(0, 8'd0, 23'h7FFFFF, 0);
    check(1, 8'd255, 23'h000001, 0);
    check(0, 8'd1, 23'h123456, 0);
    check(1, 8'd254, 23'h7FFFFF, 0);
    check(0, 8'd127, 23'h0, 1);
    for (int i = 0; i < 3000; i++)
      check(1'($urandom), 8'($urandom), 23'($urandom), ($urandom % 8) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
