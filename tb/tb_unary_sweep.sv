// tb_unary_sweep: exhaustive accuracy sweep of the three table
// configurations that differ only in their sizes:
//   A: 9-bit x, ROM 2 7 bits wide, ROM 3 8 bits
//   B: 9-bit x, ROM 2 8 bits wide, ROM 3 8 bits (the unit's default)
//   C: 10-bit x, ROM 2 8 bits wide, ROM 3 6 bits
// Every significand from 1.0 to 2 - 2^-23 is applied with exponent 127
// (unbiased 0) to each function, and with exponent 128 (odd) to the two
// root functions, one operand per time step. Each result is compared with a
// double-precision reference truncated to single precision. Checks: no
// result more than one unit in the last place away, and per function an LSB
// error rate below 10 % for A and B and below 6 % for C. The rates are
// printed with their positive (result too small) and negative parts.
module tb_unary_sweep;
  localparam int STRIDE = 1;            // 1 = every significand
  localparam int N_STEP = (1 << 23) / STRIDE;

  logic [31:0] v;
  logic [1:0]  fn;
  logic [31:0] res [3];
  int checks = 0, failures = 0;
  longint steps = 0;

  unary_unit #(.X_BITS(9),  .ROM2_W(7), .ROM3_W(8)) cfg_a (.v(v), .fn(fn), .result(res[0]));
  unary_unit                                        cfg_b (.v(v), .fn(fn), .result(res[1]));
  unary_unit #(.X_BITS(10), .ROM2_W(8), .ROM3_W(6)) cfg_c (.v(v), .fn(fn), .result(res[2]));

  initial begin
    #(longint'(6) * N_STEP + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n [3][5];
  int pos [3][5];
  int neg [3][5];
  int big [3][5];
  string cfg_name [3] = '{"A", "B", "C"};
  string run_name [5] = '{"1/z", "sqrt z (even exponent)", "sqrt 2z (odd exponent)",
                          "1/sqrt z (even exponent)", "1/sqrt 2z (odd exponent)"};

  initial begin
    real         z, a, r;
    logic [63:0] d;
    logic [31:0] ref_bits;
    logic [7:0]  e;
    int          diff, limit;
    v  = 32'h3F80_0000;
    fn = 2'd0;
    for (int c = 0; c < 3; c++)
      for (int k = 0; k < 5; k++) begin
        n[c][k] = 0; pos[c][k] = 0; neg[c][k] = 0; big[c][k] = 0;
      end
    for (int k = 0; k < 5; k++) begin
      e = (k == 2 || k == 4) ? 8'd128 : 8'd127;
      for (int i = 0; i < (1 << 23); i += STRIDE) begin
        z = 1.0 + real'(i) / 8388608.0;
        a = (e == 8'd128) ? 2.0 * z : z;
        case (k)
          0:       r = 1.0 / a;
          1, 2:    r = $sqrt(a);
          default: r = 1.0 / $sqrt(a);
        endcase
        d = $realtobits(r);
        ref_bits = {1'b0, 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
        v  = {1'b0, e, 23'(i)};
        fn = (k == 0) ? 2'd0 : (k < 3) ? 2'd1 : 2'd2;
        #1;
        for (int c = 0; c < 3; c++) begin
          diff = int'(ref_bits) - int'(res[c]);
          n[c][k]++;
          if (diff > 0) pos[c][k]++;
          if (diff < 0) neg[c][k]++;
          if (diff > 1 || diff < -1) begin
            big[c][k]++;
            if (big[c][k] < 4)
              $display("FAIL config %s %s: v=%h result=%h expected %h", cfg_name[c],
                       run_name[k], v, res[c], ref_bits);
          end
        end
        steps++;
      end
    end
    for (int c = 0; c < 3; c++) begin
      limit = (c == 2) ? 6 : 10;
      for (int k = 0; k < 5; k++) begin
        $display("config %s %-26s LSB errors %5.2f%% (positive %5.2f%%, negative %5.2f%%)",
                 cfg_name[c], run_name[k], 100.0 * (pos[c][k] + neg[c][k]) / n[c][k],
                 100.0 * pos[c][k] / n[c][k], 100.0 * neg[c][k] / n[c][k]);
        checks += 2;
        if (big[c][k] != 0) failures++;
        if ((pos[c][k] + neg[c][k]) * 100 >= limit * n[c][k]) begin
          failures++;
          $display("FAIL config %s %s: error rate above %0d %%", cfg_name[c], run_name[k], limit);
        end
      end
    end
    $display("operands per configuration: %0d", steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
