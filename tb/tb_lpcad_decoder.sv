// tb_lpcad_decoder: exhaustive check of the reciprocal-constant decoder for
// K = 3 and K = 2 against the decimal constants of the method, and a check
// that every constant C satisfies C * (upper end of its range) <= 0.5 and
// lies within 1/8 of 1/(1+B_M) over its range.
module tb_lpcad_decoder;
  import tb_lpcad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] msb3; logic [3:0] c3;
  logic [1:0] msb2; logic [2:0] c2;

  lpcad_decoder #(.K(3)) dut3 (.b_msb(msb3), .c(c3));
  lpcad_decoder #(.K(2)) dut2 (.b_msb(msb2), .c(c2));

  task automatic check_range(int k, int idx, logic [7:0] got);
    real cval = real'(got) / real'(1 << (k + 1));
    real lo = real'(idx) / real'(1 << k), hi = real'(idx + 1) / real'(1 << k);
    checks++;
    if (longint'(got) != const_units(k, idx)) begin
      failures++; $display("FAIL K=%0d idx=%0d c=%0d exp=%0d", k, idx, got, const_units(k, idx));
    end
    checks++;
    if (cval * hi > 0.5 + 1e-9) begin
      failures++; $display("FAIL K=%0d idx=%0d: C*hi > 0.5", k, idx);
    end
    checks++;
    if (cval - 1.0/(1.0+hi) > 0.125 || 1.0/(1.0+lo) - cval > 0.125) begin
      failures++; $display("FAIL K=%0d idx=%0d: constant far from 1/(1+B_M)", k, idx);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      msb3 = 3'(i); #1; check_range(3, i, 8'(c3));
    end
    for (int i = 0; i < 4; i++) begin
      msb2 = 2'(i); #1; check_range(2, i, 8'(c2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
