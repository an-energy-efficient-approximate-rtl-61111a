// tb_lpcad_table2: accuracy sweep of the FP LPCAD divider over the
// configurations of the published accuracy table: FP(1,3,4), FP(1,5,10) and
// FP(1,8,23) with K = 2, 3 and several truncation widths T. For each
// configuration 100 000 random significand pairs (uniform fractions) are
// divided; every quotient fraction is compared bit for bit with the
// reference model, and the mean relative error distance (MRED) and the mean
// relative error (bias) against the exact significand ratio are printed next
// to the published values. For 16- and 32-bit formats the MRED must lie
// within 20 % of the published value. The 8-bit rows are printed only: a
// 4-bit fraction output cannot reach some of the published 8-bit values, so
// they are held only to MRED < 3 %.
module tb_lpcad_table2;
  import tb_lpcad_ref_pkg::*;

  localparam int NC = 16;
  localparam int CFG_NE [NC] = '{3, 3, 3, 3,  5, 5, 5, 5, 5, 5,  8, 8, 8, 8, 8, 8};
  localparam int CFG_NM [NC] = '{4, 4, 4, 4,  10,10,10,10,10,10, 23,23,23,23,23,23};
  localparam int CFG_K  [NC] = '{2, 2, 3, 3,  2, 2, 2, 3, 3, 3,  2, 2, 2, 3, 3, 3};
  localparam int CFG_T  [NC] = '{4, 5, 4, 5,  4, 8, 10,4, 8, 10, 4, 8, 23,4, 8, 23};
  // published MRED and bias, percent
  localparam real PUB_MRED [NC] = '{2.83, 1.98, 2.17, 1.39, 2.87, 1.32, 1.30, 2.53, 0.77, 0.75,
                                    2.88, 1.31, 1.28, 2.54, 0.77, 0.74};
  localparam real PUB_BIAS [NC] = '{0.00, 0.79, -0.29, 0.72, -1.45, -0.04, 0.02, -1.58, 0.14, 0.23,
                                    -1.49, -0.09, 0.00, -1.63, 0.09, 0.20};
  localparam int N = 100000;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  real mred [NC];
  real bias [NC];
  int  mism [NC];
  bit  done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int NE = CFG_NE[g], NM = CFG_NM[g], K = CFG_K[g], T = CFG_T[g];
    localparam int FW = 1 + NE + NM;
    localparam int MID = (1 << (NE - 1)) - 1;
    logic [FW-1:0] a, b, q;
    logic ovf, unf;

    lpcad_fp_div #(.NE(NE), .NM(NM), .K(K), .T(T)) dut (
      .a(a), .b(b), .q(q), .exp_ovf(ovf), .exp_unf(unf)
    );

    initial begin
      real sa, se, ex, ap, red;
      longint am, bm;
      bit neg;
      sa = 0.0; se = 0.0; mism[g] = 0; done[g] = 0;
      for (int n = 0; n < N; n++) begin
        am = {$urandom, $urandom} & ((longint'(1) << NM) - 1);
        bm = {$urandom, $urandom} & ((longint'(1) << NM) - 1);
        a = {1'b0, NE'(MID), NM'(am)};
        b = {1'b0, NE'(MID), NM'(bm)};
        #1;
        if (longint'(q[NM-1:0]) != quot_mant(am, bm, NM, K, T)) mism[g]++;
        neg = mant_diff(am, bm, NM, T) < 0;
        ex  = exact_ratio(am, bm, NM);
        ap  = (1.0 + real'(q[NM-1:0]) / real'(longint'(1) << NM)) * (neg ? 0.5 : 1.0);
        red = (ap - ex) / ex;
        se += red;
        sa += (red < 0.0) ? -red : red;
      end
      mred[g] = 100.0 * sa / N;
      bias[g] = 100.0 * se / N;
      done[g] = 1;
    end
  end

  initial begin
    bit all_done;
    do begin
      #100;
      all_done = 1;
      for (int i = 0; i < NC; i++) if (!done[i]) all_done = 0;
    end while (!all_done);
    $display(" format      K  T   MRED %%  (published)   bias %%  (published)");
    for (int i = 0; i < NC; i++) begin
      $display(" FP(1,%0d,%0d)  %0d  %0d   %6.3f   (%5.2f)      %6.3f   (%5.2f)",
               CFG_NE[i], CFG_NM[i], CFG_K[i], CFG_T[i], mred[i], PUB_MRED[i], bias[i], PUB_BIAS[i]);
      checks++;
      if (mism[i] != 0) begin
        failures++; $display("FAIL config %0d: %0d quotients differ from the reference", i, mism[i]);
      end
      checks++;
      if (CFG_NM[i] > 4) begin
        if (mred[i] < 0.8 * PUB_MRED[i] || mred[i] > 1.2 * PUB_MRED[i]) begin
          failures++; $display("FAIL config %0d: MRED more than 20 %% from the published value", i);
        end
      end else if (mred[i] > 3.0) begin
        failures++; $display("FAIL config %0d: MRED above 3 %%", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
