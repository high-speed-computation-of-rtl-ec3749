// tb_unary_ctrl: every combination of sign, exponent, fraction-zero flag and
// function code (4096 cases) against a reference written from the operand's
// IEEE class: parity only for odd unbiased exponents of finite non-zero
// operands, term signs and table scale lines per function, NaN for invalid
// operations, and the result sign.
module tb_unary_ctrl;
  logic       clk = 1'b0;
  logic       sign, fzero;
  logic [7:0] exp;
  logic [1:0] fn;
  logic       parity, sub1, sub2, scale1, scale2, nan, res_sign;
  int checks = 0, failures = 0, cycles = 0;

  unary_ctrl dut (.sign(sign), .exp(exp), .fzero(fzero), .fn(fn), .parity(parity),
                  .sub1(sub1), .sub2(sub2), .scale1(scale1), .scale2(scale2),
                  .nan(nan), .res_sign(res_sign));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit is_zero, is_inf, is_nan, is_denorm, is_normal;
    bit e_par, e_s1, e_s2, e_c1, e_c2, e_nan, e_sign;
    sign = 0; fzero = 0; exp = 0; fn = 0;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk);
      {fn, sign, fzero, exp} = 12'(i);
      @(negedge clk);
      is_zero   = (exp == 0) && fzero;
      is_denorm = (exp == 0) && !fzero;
      is_inf    = (exp == 255) && fzero;
      is_nan    = (exp == 255) && !fzero;
      is_normal = !is_zero && !is_denorm && !is_inf && !is_nan;
      e_par  = is_normal && ((int'(exp) - 127) % 2 != 0);
      e_s1   = (fn == 0) || (fn == 2);
      e_s2   = (fn == 1);
      e_c1   = (fn == 1);
      e_c2   = (fn == 1) || (fn == 2);
      e_nan  = (fn == 3) || is_nan || is_denorm || ((fn != 0) && sign && !is_zero);
      e_sign = (fn == 0) ? sign : (sign && is_zero);
      checks++;
      if ({parity, sub1, sub2, scale1, scale2, nan, res_sign} !==
          {e_par, e_s1, e_s2, e_c1, e_c2, e_nan, e_sign}) begin
        failures++;
        $display("FAIL fn=%0d s=%b e=%0d fz=%b: got %b%b%b%b%b%b%b expected %b%b%b%b%b%b%b",
                 fn, sign, exp, fzero, parity, sub1, sub2, scale1, scale2, nan, res_sign,
                 e_par, e_s1, e_s2, e_c1, e_c2, e_nan, e_sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
