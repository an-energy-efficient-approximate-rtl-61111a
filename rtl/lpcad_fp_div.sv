// lpcad_fp_div: LPCAD approximate floating-point divider, LPCAD(K, T).
//
// Idea: with log2(1+x) ~ 2x on [-0.5, 0) and ~ x on [0, 1], the significand
// quotient (1+A_M)/(1+B_M) becomes
//     1 + (A_M - B_M) / (1+B_M)           if A_M >= B_M
//     2 + 2 (A_M - B_M) / (1+B_M)         otherwise (exponent one lower),
// and 1/(1+B_M) is replaced by a constant C picked from the top K bits of
// B_M. The division is thus one subtraction and one small multiplication.
//
// Datapath (all combinational):
//   sign     q_s = a_s XOR b_s
//   mantissa S = trunc_T(A_M) - trunc_T(B_M)      (lpcad_mant_sub)
//            C = decode(B_M[top K])               (lpcad_decoder)
//            P = S x C, truncated                 (lpcad_trunc_mult)
//   mux      S >= 0: Q_M = p-1 .. p-NM
//            S <  0: P is 1.1xxx, so 2P+2 = 0.p-2 p-3 ..., Q_M = p-2 .. p-(NM+1)
//            (product bits beyond the kept columns read as 0)
//   exponent Q_E = A_E + NOT(B_E) + NOT(s0) + bias (lpcad_exp_unit)
//
// Formats: {sign, NE-bit biased exponent, NM-bit fraction}; default FP(1,5,10)
// half precision with K = 3, T = 8. Inputs are taken as normal numbers: zero,
// subnormals, infinities and NaN are not treated specially (the method does
// not define them). exp_ovf / exp_unf flag a quotient whose exponent left the
// normal range; q_e then wraps. These flags and the exact truncation rule for
// T (T fraction bits kept at the subtractor, product columns down to
// 2^-(T+1)) are choices of this design.
module lpcad_fp_div #(
  parameter int unsigned NE = 5,
  parameter int unsigned NM = 10,
  parameter int unsigned K  = 3,
  parameter int unsigned T  = 8,
  localparam int unsigned FW = 1 + NE + NM
) (
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  output logic [FW-1:0] q,
  output logic          exp_ovf,
  output logic          exp_unf
);
  localparam int unsigned W = (T + 1 < NM + K + 1) ? T + 1 : NM + K + 1;

  logic          a_s, b_s, q_s;
  logic [NE-1:0] a_e, b_e, q_e;
  logic [NM-1:0] a_m, b_m, q_m;
  logic [NM:0]   s;
  logic [K:0]    c;
  logic [W:0]    p;
  // product fraction bits p-1 .. p-(NM+1), zero-extended below p-W
  logic [NM:0]   p_frac;

  assign {a_s, a_e, a_m} = a;
  assign {b_s, b_e, b_m} = b;

  lpcad_mant_sub #(.NM(NM), .T(T)) u_sub (
    .a_m(a_m), .b_m(b_m), .s(s)
  );

  lpcad_decoder #(.K(K)) u_dec (
    .b_msb(b_m[NM-1 -: K]), .c(c)
  );

  lpcad_trunc_mult #(.NM(NM), .K(K), .T(T)) u_mul (
    .s(s), .c(c), .p(p)
  );

  lpcad_exp_unit #(.NE(NE)) u_exp (
    .a_e(a_e), .b_e(b_e), .s_neg(s[NM]),
    .q_e(q_e), .ovf(exp_ovf), .unf(exp_unf)
  );

  always_comb begin
    p_frac = '0;
    for (int i = 1; i <= NM + 1; i++) begin
      if (i <= W) p_frac[NM+1-i] = p[W-i];
    end
    // output multiplexer
    q_m = s[NM] ? p_frac[NM-1:0] : p_frac[NM:1];
    q_s = a_s ^ b_s;
    q   = {q_s, q_e, q_m};
  end

endmodule
