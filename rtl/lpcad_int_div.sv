// lpcad_int_div: LPCAD approximate unsigned integer divider.
//
// q ~ floor(a / b). Each operand goes through a leading-one detector and a
// barrel shifter (lpcad_int_to_fp) to become (1.m) * 2^e; the pair is fed,
// with a bias added to the exponents, to the floating-point LPCAD core
// (lpcad_fp_div); the core's quotient is shifted back to an integer by
// lpcad_fp_to_int. The divisor's fraction is shorter than the dividend's
// and is zero-padded at the bottom.
//
// Internal format: NM = WA-1 fraction bits, NE = clog2(WA)+1 exponent bits,
// bias 2^(NE-1)-1, wide enough that the core exponent never wraps for any
// a, b. Widths (16/8), K = 3, T = 8 and the zero handling (a = 0 gives 0,
// b = 0 gives all ones and div_by_zero = 1) are choices of this design.
// Purely combinational.
module lpcad_int_div #(
  parameter int unsigned WA = 16,  // dividend and quotient width
  parameter int unsigned WB = 8,   // divisor width, WB <= WA
  parameter int unsigned K  = 3,
  parameter int unsigned T  = 8
) (
  input  logic [WA-1:0] a,
  input  logic [WB-1:0] b,
  output logic [WA-1:0] q,
  output logic          div_by_zero
);
  import lpcad_pkg::*;

  localparam int unsigned NM   = WA - 1;
  localparam int unsigned PA   = (WA > 1) ? $clog2(WA) : 1;
  localparam int unsigned PB   = (WB > 1) ? $clog2(WB) : 1;
  localparam int unsigned NE   = PA + 1;
  localparam int unsigned BIAS = fp_bias(NE);
  localparam int unsigned FW   = 1 + NE + NM;

  if (WB > WA || WB < 2) begin : g_bad_w
    $error("lpcad_int_div: need 2 <= WB <= WA");
  end

  logic [PA-1:0] e_a;
  logic [PB-1:0] e_b;
  logic [WA-2:0] m_a;
  logic [WB-2:0] m_b;
  logic          z_a, z_b;
  logic [FW-1:0] fa, fb, fq;
  logic          ovf, unf;
  logic [NE-1:0] q_e;
  logic signed [NE:0] e_q;
  logic [WA-1:0] q_shift;

  lpcad_int_to_fp #(.W(WA)) u_cvt_a (.x(a), .e(e_a), .m(m_a), .zero(z_a));
  lpcad_int_to_fp #(.W(WB)) u_cvt_b (.x(b), .e(e_b), .m(m_b), .zero(z_b));

  always_comb begin
    fa = {1'b0, NE'(e_a) + NE'(BIAS), m_a};
    fb = {1'b0, NE'(e_b) + NE'(BIAS), m_b, {(WA-WB){1'b0}}};
  end

  lpcad_fp_div #(.NE(NE), .NM(NM), .K(K), .T(T)) u_core (
    .a(fa), .b(fb), .q(fq), .exp_ovf(ovf), .exp_unf(unf)
  );

  always_comb begin
    q_e = fq[NM +: NE];
    e_q = $signed({1'b0, q_e}) - $signed((NE+1)'(BIAS));
  end

  lpcad_fp_to_int #(.NM(NM), .WE(NE + 1), .WQ(WA)) u_out (
    .e(e_q), .m(fq[NM-1:0]), .q(q_shift)
  );

  always_comb begin
    div_by_zero = z_b;
    if (z_b)      q = '1;
    else if (z_a) q = '0;
    else          q = q_shift;
  end

  // The internal exponent range is sized so the core never flags overflow
  // or underflow for nonzero operands; both operands are positive, so the
  // core's sign output is always 0.
  always_comb begin
    if (!z_a && !z_b) assert (!ovf && !unf && !fq[FW-1])
      else $error("lpcad_int_div: internal exponent or sign out of range");
  end

endmodule
