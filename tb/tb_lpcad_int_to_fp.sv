// tb_lpcad_int_to_fp: exhaustive check of the 16-bit integer-to-FP
// converter and of an 8-bit one: x must equal (2^15 + m) * 2^(e-15), i.e.
// (1.m) * 2^e, with no bits lost. Includes the worked example
// 00101100 -> e = 5, 1.m = 1.0110000.
module tb_lpcad_int_to_fp;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] x;
  logic [3:0]  e;
  logic [14:0] m;
  logic        zero;
  logic [7:0]  x8;
  logic [2:0]  e8;
  logic [6:0]  m8;
  logic        zero8;

  lpcad_int_to_fp dut (.x(x), .e(e), .m(m), .zero(zero));
  lpcad_int_to_fp #(.W(8)) dut8 (.x(x8), .e(e8), .m(m8), .zero(zero8));

  initial begin
    x8 = 8'b0010_1100; x = '0; #1;
    checks++;
    if (e8 != 3'd5 || m8 != 7'b0110000) begin
      failures++; $display("FAIL example e=%0d m=%b", e8, m8);
    end
    for (int v = 0; v < 65536; v++) begin
      longint recon;
      x = 16'(v); #1;
      recon = ((longint'(1) << 15) + longint'(m)) << e;
      checks++;
      if (v == 0 ? !zero : (zero || recon != (longint'(v) << 15))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d e=%0d m=%h", v, e, m);
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
