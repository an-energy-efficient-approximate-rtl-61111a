// tb_lpcad_fp_div: checks the FP LPCAD divider.
// Default instance, half precision LPCAD(3,8), and a second instance
// LPCAD(2,4): random normal operands, every output bit compared with the
// arithmetic reference model (sign XOR, exponent A_E-B_E-s0+bias, fraction
// from the truncated-product formula). For the default instance the relative
// error against the exact quotient is also accumulated: its mean (MRED) must
// be near the 0.77 % published for this configuration, and no single
// quotient may be off by more than 6 %.
module tb_lpcad_fp_div;
  import tb_lpcad_ref_pkg::*;

  localparam int N = 200000;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a, b, q, q2;
  logic ovf, unf, ovf2, unf2;

  lpcad_fp_div dut (.a(a), .b(b), .q(q), .exp_ovf(ovf), .exp_unf(unf));
  lpcad_fp_div #(.NE(5), .NM(10), .K(2), .T(4)) dut2 (.a(a), .b(b), .q(q2), .exp_ovf(ovf2), .exp_unf(unf2));

  function automatic logic [15:0] ref_q(logic [15:0] x, logic [15:0] y, int k, int t);
    longint am = longint'(x[9:0]), bm = longint'(y[9:0]);
    int s0 = (mant_diff(am, bm, 10, t) < 0) ? 1 : 0;
    int e = int'(x[14:10]) - int'(y[14:10]) - s0 + 15;
    return {x[15] ^ y[15], 5'(e), 10'(quot_mant(am, bm, 10, k, t))};
  endfunction

  real sum_abs = 0.0, sum_err = 0.0, worst = 0.0;
  int  n_neg = 0, n_pos = 0;

  initial begin
    for (int n = 0; n < N; n++) begin
      real exact, approx, red;
      int e;
      bit neg;
      a = {1'($urandom), 5'($urandom_range(1, 30)), 10'($urandom)};
      b = {1'($urandom), 5'($urandom_range(1, 30)), 10'($urandom)};
      #1;
      checks++;
      if (q != ref_q(a, b, 3, 8)) begin
        failures++;
        if (failures < 10) $display("FAIL (3,8) a=%h b=%h q=%h exp=%h", a, b, q, ref_q(a, b, 3, 8));
      end
      checks++;
      if (q2 != ref_q(a, b, 2, 4)) begin
        failures++;
        if (failures < 10) $display("FAIL (2,4) a=%h b=%h q=%h exp=%h", a, b, q2, ref_q(a, b, 2, 4));
      end
      // the sign of the (truncated) mantissa difference sets the exponent
      neg = mant_diff(longint'(a[9:0]), longint'(b[9:0]), 10, 8) < 0;
      e = int'(a[14:10]) - int'(b[14:10]) + 15 - (neg ? 1 : 0);
      checks++;
      if (ovf != (e >= 31) || unf != (e <= 0)) begin
        failures++;
        if (failures < 10) $display("FAIL flags a=%h b=%h", a, b);
      end
      // accuracy of the significand (exponent range ignored)
      exact  = exact_ratio(longint'(a[9:0]), longint'(b[9:0]), 10);
      approx = (1.0 + real'(q[9:0]) / 1024.0) * (neg ? 0.5 : 1.0);
      red = (approx - exact) / exact;
      sum_err += red;
      sum_abs += (red < 0) ? -red : red;
      if (((red < 0) ? -red : red) > worst) worst = (red < 0) ? -red : red;
      if (neg) n_neg++; else n_pos++;
    end
    $display("LPCAD(3,8) FP16: MRED = %0.3f %%, bias = %0.3f %%, max |RED| = %0.2f %%",
             100.0 * sum_abs / N, 100.0 * sum_err / N, 100.0 * worst);
    checks++;
    if (100.0 * sum_abs / N < 0.6 || 100.0 * sum_abs / N > 0.95) begin
      failures++; $display("FAIL MRED outside 0.6..0.95 %%");
    end
    checks++;
    if (worst > 0.06) begin
      failures++; $display("FAIL max relative error above 6 %%");
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) begin
      failures++; $display("FAIL both mantissa orderings must occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
