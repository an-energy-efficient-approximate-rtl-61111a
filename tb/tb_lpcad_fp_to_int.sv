// tb_lpcad_fp_to_int: checks the output barrel shifter: for every exponent
// from -32 to 31 and random fractions, q must be floor((1.m) * 2^e),
// 0 for e < 0 and all ones when the value needs more than 16 bits.
module tb_lpcad_fp_to_int;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [5:0] e;
  logic [14:0] m;
  logic [15:0] q;

  lpcad_fp_to_int dut (.e(e), .m(m), .q(q));

  initial begin
    for (int ei = -32; ei < 32; ei++) begin
      for (int r = 0; r < 200; r++) begin
        real v;
        longint expv;
        e = 6'(ei); m = 15'($urandom); #1;
        v = (1.0 + real'(m) / 32768.0) * (2.0 ** ei);
        if (ei < 0) expv = 0;
        else if (v >= 65536.0) expv = 65535;
        else expv = longint'($floor(v));
        checks++;
        if (longint'(q) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d m=%h q=%0d exp=%0d", ei, m, q, expv);
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
