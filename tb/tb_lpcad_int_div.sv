// tb_lpcad_int_div: checks the 16/8 LPCAD integer divider. Random operands:
// the quotient must equal floor((1.Q) * 2^E), where the fraction Q and the
// exponent E come from the arithmetic reference model applied to the
// operands' normalised forms. The mean relative error against the exact
// a/b (for quotients >= 16, where the integer floor matters little) must
// stay below 2 %. Zero operands are checked separately.
module tb_lpcad_int_div;
  import tb_lpcad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a, q;
  logic [7:0]  b;
  logic        dz;

  lpcad_int_div dut (.a(a), .b(b), .q(q), .div_by_zero(dz));

  function automatic int lg2(longint v);
    int r = 0;
    while (v > 1) begin v = v >> 1; r++; end
    return r;
  endfunction

  function automatic longint ref_q(longint x, longint y);
    int ea = lg2(x), eb = lg2(y);
    longint am = ((x << 15) >> ea) & 32767;     // 15-bit fraction of x
    longint bm = ((y << 15) >> eb) & 32767;     // divisor fraction, zero padded
    longint qm = quot_mant(am, bm, 15, 3, 8);
    int e = ea - eb - ((mant_diff(am, bm, 15, 8) < 0) ? 1 : 0);
    longint sig = 32768 + qm;                   // 1.Q in units of 2^-15
    if (e < 0) return 0;
    return (sig << e) >> 15;
  endfunction

  real sum_abs = 0.0;
  int  n_acc = 0;

  initial begin
    a = 16'd1000; b = 8'd0; #1;
    checks++;
    if (!dz || q != 16'hFFFF) begin failures++; $display("FAIL divide by zero"); end
    a = 16'd0; b = 8'd7; #1;
    checks++;
    if (dz || q != 16'd0) begin failures++; $display("FAIL zero dividend"); end
    for (int n = 0; n < 100000; n++) begin
      longint exp_q;
      a = 16'($urandom_range(1, 65535) >> $urandom_range(0, 15));
      if (a == 0) a = 1;
      b = 8'($urandom_range(1, 255));
      #1;
      exp_q = ref_q(longint'(a), longint'(b));
      checks++;
      if (dz || longint'(q) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d q=%0d exp=%0d", a, b, q, exp_q);
      end
      if (real'(a) / real'(b) >= 16.0) begin
        real ex, red;
        ex = real'(a) / real'(b);
        red = (real'(q) - ex) / ex;
        sum_abs += (red < 0) ? -red : red;
        n_acc++;
      end
    end
    $display("16/8 integer LPCAD(3,8): MRED = %0.3f %% over %0d quotients >= 16",
             100.0 * sum_abs / n_acc, n_acc);
    checks++;
    if (n_acc == 0 || 100.0 * sum_abs / n_acc > 2.0) begin
      failures++; $display("FAIL MRED too high");
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
