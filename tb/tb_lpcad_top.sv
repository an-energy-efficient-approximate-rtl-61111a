// tb_lpcad_top: end-to-end test of both dividers at their default sizes
// (half-precision LPCAD(3,8) and the 16/8 integer divider).
//
// FP part: random normal operands of all exponents plus pixel-ratio style
// operands (integers 1..255 converted to half precision, as in ratio-based
// change detection). Each quotient is compared bit for bit with the
// arithmetic reference model, and its real value with the exact a/b
// (within 6 % whenever the exponent stays in range).
// Integer part: random operands compared with the reference model.
// Mechanisms that must each occur at least once: both orderings of the
// mantissas (quotient renormalised or not), negative quotients, exponent
// overflow and underflow flags, divide by zero, zero dividend, integer
// quotient below one, and T-bit truncation changing the mantissa ordering.
module tb_lpcad_top;
  import tb_lpcad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] fp_a, fp_b, fp_q, int_a, int_q;
  logic [7:0]  int_b;
  logic        ovf, unf, dz;

  lpcad_top dut (
    .fp_a(fp_a), .fp_b(fp_b), .fp_q(fp_q), .fp_exp_ovf(ovf), .fp_exp_unf(unf),
    .int_a(int_a), .int_b(int_b), .int_q(int_q), .int_div_by_zero(dz)
  );

  // mechanism counters
  int n_mpos = 0, n_mneg = 0, n_sign = 0, n_ovf = 0, n_unf = 0;
  int n_dz = 0, n_za = 0, n_qlt1 = 0, n_trunc = 0;

  function automatic real fp16_val(logic [15:0] x);
    real v;
    int e;
    v = 1.0 + real'(x[9:0]) / 1024.0;
    for (e = int'(x[14:10]) - 15; e > 0; e--) v = v * 2.0;
    for (; e < 0; e++) v = v / 2.0;
    if (x[15]) v = -v;
    return v;
  endfunction

  function automatic logic [15:0] int_to_fp16(int v);
    int e = 0;
    while ((v >> e) > 1) e++;
    return {1'b0, 5'(e + 15), 10'(((v << 10) >> e) & 1023)};
  endfunction

  function automatic int lg2(longint v);
    int r = 0;
    while (v > 1) begin v = v >> 1; r++; end
    return r;
  endfunction

  task automatic check_fp();
    longint am = longint'(fp_a[9:0]), bm = longint'(fp_b[9:0]);
    bit neg = mant_diff(am, bm, 10, 8) < 0;
    int e = int'(fp_a[14:10]) - int'(fp_b[14:10]) - (neg ? 1 : 0) + 15;
    logic [15:0] expq = {fp_a[15] ^ fp_b[15], 5'(e), 10'(quot_mant(am, bm, 10, 3, 8))};
    checks++;
    if (fp_q != expq || ovf != (e >= 31) || unf != (e <= 0)) begin
      failures++;
      if (failures < 10) $display("FAIL fp a=%h b=%h q=%h exp=%h", fp_a, fp_b, fp_q, expq);
    end
    if (e > 0 && e < 31) begin
      real ex = fp16_val(fp_a) / fp16_val(fp_b);
      real red = (fp16_val(fp_q) - ex) / ex;
      checks++;
      if (red > 0.06 || red < -0.06) begin
        failures++;
        if (failures < 10) $display("FAIL fp accuracy a=%h b=%h red=%f", fp_a, fp_b, red);
      end
    end
    if (neg) n_mneg++; else n_mpos++;
    if (neg != (am < bm)) n_trunc++;
    if (fp_q[15]) n_sign++;
    if (ovf) n_ovf++;
    if (unf) n_unf++;
  endtask

  task automatic check_int();
    longint expq;
    if (int_b == 0) begin
      expq = 65535; n_dz++;
    end else if (int_a == 0) begin
      expq = 0; n_za++;
    end else begin
      int ea = lg2(longint'(int_a)), eb = lg2(longint'(int_b));
      longint am = ((longint'(int_a) << 15) >> ea) & 32767;
      longint bm = ((longint'(int_b) << 15) >> eb) & 32767;
      int e = ea - eb - ((mant_diff(am, bm, 15, 8) < 0) ? 1 : 0);
      expq = (e < 0) ? 0 : (((32768 + quot_mant(am, bm, 15, 3, 8)) << e) >> 15);
      if (int_a < 16'(int_b)) n_qlt1++;
    end
    checks++;
    if (longint'(int_q) != expq || dz != (int_b == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL int a=%0d b=%0d q=%0d exp=%0d", int_a, int_b, int_q, expq);
    end
  endtask

  initial begin
    // random FP operands over the full normal range
    for (int n = 0; n < 50000; n++) begin
      fp_a = {1'($urandom), 5'($urandom_range(1, 30)), 10'($urandom)};
      fp_b = {1'($urandom), 5'($urandom_range(1, 30)), 10'($urandom)};
      int_a = 16'($urandom >> $urandom_range(0, 31));
      int_b = 8'($urandom >> $urandom_range(0, 31));
      #1;
      check_fp();
      check_int();
    end
    // pixel ratios
    for (int p = 1; p < 256; p++) begin
      for (int r = 1; r < 256; r += 7) begin
        fp_a = int_to_fp16(p); fp_b = int_to_fp16(r);
        int_a = 16'(p << 8); int_b = 8'(r);
        #1;
        check_fp();
        check_int();
      end
    end
    $display("mechanisms: A_M>=B_M %0d, A_M<B_M %0d, truncation flips order %0d, negative %0d, ovf %0d, unf %0d",
             n_mpos, n_mneg, n_trunc, n_sign, n_ovf, n_unf);
    $display("            int div-by-zero %0d, zero dividend %0d, quotient < 1 %0d", n_dz, n_za, n_qlt1);
    if (n_mpos == 0) begin failures++; $display("FAIL never A_M >= B_M"); end
    if (n_mneg == 0) begin failures++; $display("FAIL never A_M < B_M"); end
    if (n_trunc == 0) begin failures++; $display("FAIL truncation never mattered"); end
    if (n_sign == 0) begin failures++; $display("FAIL never negative"); end
    if (n_ovf == 0) begin failures++; $display("FAIL never overflow"); end
    if (n_unf == 0) begin failures++; $display("FAIL never underflow"); end
    if (n_dz == 0) begin failures++; $display("FAIL never divide by zero"); end
    if (n_za == 0) begin failures++; $display("FAIL never zero dividend"); end
    if (n_qlt1 == 0) begin failures++; $display("FAIL never quotient < 1"); end
    checks += 9;
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
