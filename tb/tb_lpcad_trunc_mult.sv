// tb_lpcad_trunc_mult: checks the sign-complemented truncated multiplier.
// Default instance (NM=10, K=3, T=8): exhaustive over all S and C against
// the column-truncation formula of the reference model, and a bound on the
// truncation error against the exact product. Exact instance (T = NM+K):
// P must equal S*C exactly.
module tb_lpcad_trunc_mult;
  import tb_lpcad_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [10:0] s;
  logic [3:0]  c;
  logic [9:0]  p;    // W = 9
  logic [14:0] px;   // W = 14, exact

  lpcad_trunc_mult dut (.s(s), .c(c), .p(p));
  lpcad_trunc_mult #(.NM(10), .K(3), .T(13)) dut_x (.s(s), .c(c), .p(px));

  initial begin
    for (int si = -1024; si < 1024; si++) begin
      for (int ci = 0; ci < 16; ci++) begin
        longint exact14, ref9, got9;
        real err;
        s = 11'(si); c = 4'(ci); #1;
        // exact: S*C has 10+4 = 14 fraction bits
        exact14 = longint'(si) * longint'(ci);
        checks++;
        if (longint'($signed(px)) != exact14) begin
          failures++;
          if (failures < 10) $display("FAIL exact s=%0d c=%0d p=%0d exp=%0d", si, ci, $signed(px), exact14);
        end
        ref9 = trunc_prod(si, ci, 10, 3, 8);
        got9 = longint'(p);
        checks++;
        if (got9 != ref9) begin
          failures++;
          if (failures < 10) $display("FAIL trunc s=%0d c=%0d p=%0d exp=%0d", si, ci, got9, ref9);
        end
        // truncated value never exceeds the exact one, and is close to it
        err = real'(exact14) / 16384.0 - real'($signed(p)) / 512.0;
        checks++;
        if (err < -1e-12 || err > 4.0 / 512.0) begin
          failures++;
          if (failures < 10) $display("FAIL bound s=%0d c=%0d err=%f", si, ci, err);
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
