// tb_lpcad_mant_sub: checks the truncating mantissa subtractor, exhaustively
// for NM = 10 with T = 8 (default) and T = 10 (no truncation), against
// integer subtraction of the masked fractions.
module tb_lpcad_mant_sub;
  import tb_lpcad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [9:0] a_m, b_m;
  logic [10:0] s8, s10;

  lpcad_mant_sub dut8 (.a_m(a_m), .b_m(b_m), .s(s8));
  lpcad_mant_sub #(.NM(10), .T(10)) dut10 (.a_m(a_m), .b_m(b_m), .s(s10));

  initial begin
    for (int a = 0; a < 1024; a += 3) begin
      for (int b = 0; b < 1024; b += 5) begin
        a_m = 10'(a); b_m = 10'(b); #1;
        checks++;
        if (longint'($signed(s8)) != mant_diff(a, b, 10, 8)) begin
          failures++;
          if (failures < 10) $display("FAIL T=8 a=%0d b=%0d s=%0d", a, b, $signed(s8));
        end
        checks++;
        if (longint'($signed(s10)) != longint'(a - b)) begin
          failures++;
          if (failures < 10) $display("FAIL T=10 a=%0d b=%0d s=%0d", a, b, $signed(s10));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
