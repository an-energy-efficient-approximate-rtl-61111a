// tb_lpcad_ref_pkg: arithmetic reference model for the LPCAD testbenches.
//
// Computes the divider's results from the defining equations rather than
// from the partial-product array:
//   S    = trunc_T(A_M) - trunc_T(B_M)
//   C    = the table constant for the top K bits of B_M (written out here
//          from the decimal values 0.875 ... 0.5 and 0.9375 ... 0.5)
//   P_W  = sum over the 1-bits c-j of C of
//            -s0 * 2^(W-j) + floor(frac(S) * 2^(W-j))      (units 2^-W)
//          taken modulo 2^(W+1), W = min(T+1, NM+K+1)
//   Q_M  = bits -1..-NM of P (S >= 0) or bits -2..-(NM+1) (S < 0)
//   Q_E  = A_E - B_E - s0 + bias
package tb_lpcad_ref_pkg;

  function automatic real table_const(int k, int idx);
    real t2 [4] = '{0.875, 0.75, 0.625, 0.5};
    real t3 [8] = '{0.9375, 0.875, 0.75, 0.6875, 0.625, 0.5625, 0.5625, 0.5};
    if (k == 2) return t2[idx];
    return t3[idx];
  endfunction

  // constant as integer in units of 2^-(k+1)
  function automatic longint const_units(int k, int idx);
    return longint'(table_const(k, idx) * real'(longint'(1) << (k + 1)));
  endfunction

  function automatic int kept_cols(int nm, int k, int t);
    return (t + 1 < nm + k + 1) ? t + 1 : nm + k + 1;
  endfunction

  // signed mantissa difference, NM fraction bits, as a plain integer
  function automatic longint mant_diff(longint am, longint bm, int nm, int t);
    int tk = (t < nm) ? t : nm;
    longint msk = ~((longint'(1) << (nm - tk)) - 1);
    return (am & msk) - (bm & msk);
  endfunction

  // truncated product P, W+1 bits (two's complement p0.p-1..p-W)
  function automatic longint trunc_prod(longint s, longint c, int nm, int k, int t);
    int w = kept_cols(nm, k, t);
    longint s0 = (s < 0) ? 1 : 0;
    longint sfrac = s & ((longint'(1) << nm) - 1);
    longint acc = 0;
    for (int j = 1; j <= k + 1; j++) begin
      if (((c >> (k + 1 - j)) & 1) != 0) begin
        acc += -s0 * (longint'(1) << (w - j));
        acc += (sfrac << (w - j)) >> nm;
      end
    end
    return acc & ((longint'(1) << (w + 1)) - 1);
  endfunction

  // quotient fraction field Q_M
  function automatic longint quot_mant(longint am, longint bm, int nm, int k, int t);
    int w = kept_cols(nm, k, t);
    longint s = mant_diff(am, bm, nm, t);
    longint c = const_units(k, int'(bm >> (nm - k)));
    longint p = trunc_prod(s, c, nm, k, t);
    longint qm = 0;
    int first = (s < 0) ? 2 : 1;
    for (int i = first; i < first + nm; i++) begin
      qm = qm << 1;
      if (i <= w) qm |= (p >> (w - i)) & 64'(1);
    end
    return qm;
  endfunction

  // significand ratio produced by the divider, relative to 2^(A_E-B_E)
  function automatic real approx_ratio(longint am, longint bm, int nm, int k, int t);
    real r = 1.0 + real'(quot_mant(am, bm, nm, k, t)) / real'(longint'(1) << nm);
    return (mant_diff(am, bm, nm, t) < 0) ? r / 2.0 : r;
  endfunction

  function automatic real exact_ratio(longint am, longint bm, int nm);
    real one = real'(longint'(1) << nm);
    return (one + real'(am)) / (one + real'(bm));
  endfunction

endpackage
