// tb_lpcad_exp_unit: exhaustive check of the exponent path for NE = 5:
// q_e = (A_E - B_E - s_neg + 15) mod 32 and the overflow/underflow flags.
module tb_lpcad_exp_unit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0] a_e, b_e, q_e;
  logic s_neg, ovf, unf;

  lpcad_exp_unit dut (.a_e(a_e), .b_e(b_e), .s_neg(s_neg), .q_e(q_e), .ovf(ovf), .unf(unf));

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++)
        for (int n = 0; n < 2; n++) begin
          int e;
          a_e = 5'(a); b_e = 5'(b); s_neg = n[0]; #1;
          e = a - b - n + 15;
          checks++;
          if (q_e != 5'(e) || ovf != (e >= 31) || unf != (e <= 0)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d n=%0d q=%0d ovf=%b unf=%b", a, b, n, q_e, ovf, unf);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
