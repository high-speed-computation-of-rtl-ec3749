// tb_term_adder: the 32-bit adder in both modes, add and subtract, against
// 64-bit integer arithmetic taken modulo 2^32, including wrap-around.
module tb_term_adder;
  logic        clk = 1'b0;
  logic [31:0] a, b, s;
  logic        sub;
  int checks = 0, failures = 0, cycles = 0;

  term_adder #(.W(32)) dut (.a(a), .b(b), .sub(sub), .s(s));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint x, input longint y, input bit m);
    longint e;
    @(posedge clk);
    a = 32'(x); b = 32'(y); sub = m;
    @(negedge clk);
    e = (m ? (x - y) : (x + y)) & 64'hFFFF_FFFF;
    checks++;
    if (longint'(s) != e) begin
      failures++;
      $display("FAIL %h %s %h = %h, expected %h", a, m ? "-" : "+", b, s, e);
    end
  endtask

  initial begin
    a = '0; b = '0; sub = 1'b0;
    check(0, 0, 0);
    check(0, 0, 1);
    check(0, 1, 1);
    check(32'hFFFF_FFFF, 1, 0);
    check(32'h8000_0000, 32'h0000_1234, 1);
    for (int i = 0; i < 5000; i++)
      check(longint'($urandom), longint'($urandom >> ($urandom % 32)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
