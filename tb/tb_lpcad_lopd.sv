// tb_lpcad_lopd: exhaustive check of the 16-bit leading-one detector
// against floor(log2 x) computed by repeated halving.
module tb_lpcad_lopd;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] x;
  logic [3:0]  pos;
  logic        zero;

  lpcad_lopd dut (.x(x), .pos(pos), .zero(zero));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int lg, t;
      lg = 0; t = v;
      while (t > 1) begin t = t / 2; lg++; end
      x = 16'(v); #1;
      checks++;
      if (zero != (v == 0) || (v != 0 && int'(pos) != lg)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d pos=%0d zero=%b", v, pos, zero);
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
