// lpcad_exp_unit: exponent path of the LPCAD divider.
//
// The quotient exponent is A_E - B_E + bias, less one when A_M < B_M (the
// quotient significand then lies in [0.5, 1) and is renormalised by the
// mantissa path). The subtraction is done as A_E + NOT(B_E) + cin with
// cin = NOT(s_neg): when s_neg = 1 the missing +1 of the two's complement
// supplies the "-1". A second adder adds the bias 2^(NE-1)-1. So the path is
// two adders, as in the reference architecture.
//
// The exponent field q_e wraps modulo 2^NE. As an addition of this design,
// the same sum is also formed two bits wider and compared with the normal
// range: ovf = true exponent >= 2^NE - 1 (the all-ones code), unf = true
// exponent <= 0. Purely combinational.
module lpcad_exp_unit #(
  parameter int unsigned NE = 5
) (
  input  logic [NE-1:0] a_e,
  input  logic [NE-1:0] b_e,
  input  logic          s_neg,  // A_M < B_M
  output logic [NE-1:0] q_e,
  output logic          ovf,
  output logic          unf
);
  import lpcad_pkg::*;

  localparam logic [NE+1:0] BIAS = (NE+2)'(fp_bias(NE));

  logic [NE+1:0] diff, sum;

  always_comb begin
    // first adder: A_E + ~B_E + cin, sign-extended to NE+2 bits
    diff = {2'b00, a_e} + {2'b11, ~b_e} + {{(NE+1){1'b0}}, ~s_neg};
    // second adder: bias
    sum  = diff + BIAS;
    q_e  = sum[NE-1:0];
    unf  = sum[NE+1] || (sum == '0);
    ovf  = !sum[NE+1] && (sum >= (NE+2)'((1 << NE) - 1));
  end

endmodule
