// tb_unary_unit: end-to-end test of the unary arithmetic unit at its default
// sizes (9-bit table index, 4K-word Taylor ROMs).
//
// Each operand is applied at a rising clock edge and the result is checked
// half a cycle later: the unit is combinational, so its latency is zero
// cycles and it takes one operand per cycle, which is checked at the end. Normal operands are compared against a double-precision reference
// truncated to single precision; the result must be within one unit in the
// last place, and the share of results whose last bit differs (the LSB
// error rate) must stay below 10 % per function. Directed cases cover zero,
// infinity, NaN, denormals, negative roots, underflow and the spare code.
// Every mechanism of the unit is counted and must occur at least once.
module tb_unary_unit;
  import unary_pkg::*;

  localparam int N_RANDOM = 40000;      // random operands per function
  localparam int WATCHDOG = 400000;     // cycles

  logic        clk = 1'b0;
  logic [31:0] v;
  logic [1:0]  fn;
  logic [31:0] result;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int applied = 0;

  unary_unit dut (.v(v), .fn(fn), .result(result));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #(10 * WATCHDOG);
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters
  typedef enum int {
    M_RECIP, M_SQRT_EVEN, M_SQRT_ODD, M_RSQRT_EVEN, M_RSQRT_ODD, M_EXACT_POW2,
    M_WRAP, M_ZERO_IN, M_INF_IN, M_NAN_IN, M_DENORM_IN, M_NEG_ROOT, M_UNDERFLOW,
    M_SPARE, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"reciprocal", "sqrt even exponent", "sqrt odd exponent",
    "rsqrt even exponent", "rsqrt odd exponent", "exact power of two", "x = 1 wrap",
    "zero operand", "infinite operand", "NaN operand", "denormal operand",
    "negative root", "reciprocal underflow", "spare code"};

  // LSB statistics per function
  int n_fn [3];
  int err_fn [3];
  int pos_fn [3];
  int neg_fn [3];

  function automatic real to_real(input logic [31:0] b);
    real m;
    m = 1.0 + real'(b[22:0]) / 8388608.0;
    return (b[31] ? -m : m) * $pow(2.0, real'(int'(b[30:23]) - 127));
  endfunction

  // Positive real to single precision by truncation; flushes below the
  // normal range to zero.
  function automatic logic [31:0] to_single_trunc(input real r);
    logic [63:0] d;
    int          ex;
    d  = $realtobits(r);
    ex = int'(d[62:52]) - 1023 + 127;
    if (ex < 1) return 32'd0;
    if (ex > 254) return 32'h7F80_0000;
    return {1'b0, 8'(ex), d[51:29]};
  endfunction

  task automatic apply(input logic [31:0] op, input logic [1:0] f);
    @(posedge clk);
    v  = op;
    fn = f;
    applied++;
    @(negedge clk);
  endtask

  task automatic expect_bits(input logic [31:0] op, input logic [1:0] f,
                             input logic [31:0] exp_bits, input string what);
    apply(op, f);
    checks++;
    if (result !== exp_bits) begin
      failures++;
      $display("FAIL %s: v=%h fn=%0d result=%h expected=%h", what, op, f, result, exp_bits);
    end
  endtask

  // Normal operand against the reference.
  task automatic check_normal(input logic [31:0] op, input logic [1:0] f);
    real         a, r;
    logic [31:0] ref_bits;
    int          diff;
    a = to_real(op);
    case (f)
      2'd0:    r = 1.0 / a;
      2'd1:    r = $sqrt(a);
      default: r = 1.0 / $sqrt(a);
    endcase
    if (r < 0.0) ref_bits = to_single_trunc(-r) | 32'h8000_0000;
    else         ref_bits = to_single_trunc(r);
    apply(op, f);
    checks++;
    diff = int'(ref_bits[30:0]) - int'(result[30:0]);
    if (result[31] !== ref_bits[31] || diff > 1 || diff < -1) begin
      failures++;
      $display("FAIL fn=%0d v=%h result=%h expected=%h", f, op, result, ref_bits);
    end
    n_fn[f]++;
    if (diff != 0) err_fn[f]++;
    if (diff > 0) pos_fn[f]++;
    if (diff < 0) neg_fn[f]++;
    // mechanisms
    if (f == 2'd0) mech[M_RECIP]++;
    if (f == 2'd1) mech[op[23] ? M_SQRT_EVEN : M_SQRT_ODD]++;
    if (f == 2'd2) mech[op[23] ? M_RSQRT_EVEN : M_RSQRT_ODD]++;
    if (op[22:0] == 0) mech[M_EXACT_POW2]++;
    if (op[22:14] == 0 && op[13:0] != 0 && (f == 2'd0 || (f == 2'd2 && op[23]))) mech[M_WRAP]++;
    if (ref_bits[30:23] == 0) mech[M_UNDERFLOW]++;
  endtask

  function automatic logic [31:0] rand_normal(input logic neg);
    logic [7:0] e;
    e = 8'($urandom_range(1, 254));
    return {neg, e, 23'($urandom)};
  endfunction

  initial begin
    logic [31:0] op;
    int          start_cycle;
    v  = 32'h3F80_0000;
    fn = 2'd0;
    foreach (mech[i]) mech[i] = 0;
    @(negedge clk);
    start_cycle = cycles;

    // Exact values
    expect_bits(32'h4000_0000, 2'd0, 32'h3F00_0000, "1/2");
    expect_bits(32'hC080_0000, 2'd0, 32'hBE80_0000, "1/-4");
    expect_bits(32'h4080_0000, 2'd1, 32'h4000_0000, "sqrt 4");
    expect_bits(32'h4000_0000, 2'd1, 32'h3FB5_04F3, "sqrt 2");
    expect_bits(32'h4080_0000, 2'd2, 32'h3F00_0000, "rsqrt 4");
    expect_bits(32'h3F80_0000, 2'd2, 32'h3F80_0000, "rsqrt 1");
    mech[M_EXACT_POW2] += 6;

    // Special operands
    expect_bits(32'h0000_0000, 2'd1, 32'h0000_0000, "sqrt +0");
    expect_bits(32'h8000_0000, 2'd1, 32'h8000_0000, "sqrt -0");
    expect_bits(32'h7F80_0000, 2'd1, 32'h7F80_0000, "sqrt +inf");
    expect_bits(32'hBF80_0000, 2'd1, QNAN,          "sqrt -1");
    expect_bits(32'h0000_0000, 2'd0, 32'h7F80_0000, "1/+0");
    expect_bits(32'h8000_0000, 2'd0, 32'hFF80_0000, "1/-0");
    expect_bits(32'h7F80_0000, 2'd0, 32'h0000_0000, "1/+inf");
    expect_bits(32'hFF80_0000, 2'd0, 32'h8000_0000, "1/-inf");
    expect_bits(32'h0000_0000, 2'd2, 32'h7F80_0000, "rsqrt +0");
    expect_bits(32'h7F80_0000, 2'd2, 32'h0000_0000, "rsqrt +inf");
    expect_bits(32'hC080_0000, 2'd2, QNAN,          "rsqrt -4");
    expect_bits(32'hFF80_0000, 2'd2, QNAN,          "rsqrt -inf");
    mech[M_ZERO_IN] += 5;
    mech[M_INF_IN]  += 6;
    mech[M_NEG_ROOT] += 3;
    for (int f = 0; f < 3; f++) begin
      expect_bits(32'h7FC0_0000, 2'(f), QNAN, "NaN operand");
      expect_bits(32'hFF80_0001, 2'(f), QNAN, "NaN operand");
      expect_bits(32'h0000_0001, 2'(f), QNAN, "denormal operand");
      expect_bits(32'h807F_FFFF, 2'(f), QNAN, "denormal operand");
      expect_bits(32'h3FC0_0000, 2'd3,  QNAN, "spare code");
      mech[M_NAN_IN] += 2;
      mech[M_DENORM_IN] += 2;
      mech[M_SPARE]++;
    end
    for (int i = 0; i < 200; i++) begin
      op = rand_normal(1'b1);
      expect_bits(op, 2'($urandom_range(1, 2)), QNAN, "negative root");
      mech[M_NEG_ROOT]++;
    end

    // Reciprocal underflow: exponents 253 and 254 flush to zero
    expect_bits(32'h7F00_0000, 2'd0, 32'h0000_0000, "1/2^127");
    expect_bits(32'hFE80_0001, 2'd0, 32'h8000_0000, "1/-2^126*(1+u)");
    expect_bits(32'h7E80_0000, 2'd0, 32'h0080_0000, "1/2^126");
    mech[M_UNDERFLOW] += 2;

    // Normal operands: random, plus the table boundaries near x = 1
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < N_RANDOM; i++) begin
        op = rand_normal(f == 0 ? 1'($urandom) : 1'b0);
        if (f == 0 && op[30:23] > 8'd252) op[30:23] = 8'd252;
        check_normal(op, 2'(f));
      end
      for (int i = 0; i < 64; i++) begin
        op = {1'b0, 8'(126 + (i % 4)), 9'd0, 14'($urandom)};
        check_normal(op, 2'(f));
      end
    end

    // LSB error rate per function
    for (int f = 0; f < 3; f++) begin
      $display("fn=%0d operands=%0d LSB errors=%0.2f%% (positive %0.2f%%, negative %0.2f%%)",
               f, n_fn[f], 100.0 * err_fn[f] / n_fn[f], 100.0 * pos_fn[f] / n_fn[f],
               100.0 * neg_fn[f] / n_fn[f]);
      checks++;
      if (err_fn[f] * 10 >= n_fn[f]) begin
        failures++;
        $display("FAIL fn=%0d LSB error rate too high", f);
      end
    end

    foreach (mech[i]) begin
      $display("mechanism %-22s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[i]);
      end
    end

    // One operand per cycle, each result read within its own cycle.
    checks++;
    if (cycles - start_cycle != applied) begin
      failures++;
      $display("FAIL %0d operands took %0d cycles", applied, cycles - start_cycle);
    end
    $display("operands=%0d cycles=%0d", applied, cycles - start_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
