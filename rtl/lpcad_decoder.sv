// lpcad_decoder: reciprocal-constant decoder of the LPCAD divider.
//
// Maps the K most significant fraction bits of the divisor, which select one
// of 2^K equal ranges of B_M in [0,1), to the (K+1)-bit constant B_appro that
// stands in for 1/(1+B_M) in that range. The constant sets are those of
// lpcad_pkg (K = 2 or 3). Output c holds the fraction bits c[-1]..c[-(K+1)]
// with c[K] = c[-1]; the integer bit of the constant is always 0 because all
// constants lie in [0.5, 1).
//
// Purely combinational: a 2^K-entry lookup.
module lpcad_decoder #(
  parameter int unsigned K = 3
) (
  input  logic [K-1:0] b_msb,  // top K fraction bits of the divisor
  output logic [K:0]   c       // constant, units of 2^-(K+1)
);
  import lpcad_pkg::*;

  if (K != 2 && K != 3) begin : g_bad_k
    $error("lpcad_decoder: constant sets exist only for K = 2 and K = 3");
  end

  // one constant per range, selected by comparison so that the table folds
  // into plain logic
  always_comb begin
    c = '0;
    for (int i = 0; i < (1 << K); i++) begin
      if (b_msb == K'(i)) c = (K+1)'(recip_const(K, 3'(i)));
    end
  end

endmodule
