// lpcad_pkg: constants shared by the LPCAD approximate divider.
//
// The divider replaces 1/(1+B_M), the reciprocal of the divisor's significand,
// by a constant chosen from the top K fraction bits of the divisor. The
// constants below are the piecewise-constant sets for K = 2 and K = 3; they
// were found offline by a search that minimises the mean relative error of
// the whole division while keeping C * (upper end of each range) <= 0.5,
// which bounds the product S*C to (-0.5, 1) so that no normalisation is
// needed. Each constant is an unsigned fraction 0.c1 c2 ... c(K+1), stored
// here as an integer in units of 2^-(K+1).
//
//   K = 2 : B_M range   [0,.25)  [.25,.5)  [.5,.75)  [.75,1)
//           constant     0.875    0.75      0.625     0.5
//   K = 3 : B_M range   [0,.125) ... [.875,1) (steps of 1/8)
//           constant     0.9375 0.875 0.75 0.6875 0.625 0.5625 0.5625 0.5
//
// Only K = 2 and K = 3 have constant sets; other values are rejected at
// elaboration by the modules that use this package.
package lpcad_pkg;

  // K = 2, units of 1/8
  localparam logic [2:0] RECIP_K2 [4] = '{3'd7, 3'd6, 3'd5, 3'd4};
  // K = 3, units of 1/16
  localparam logic [3:0] RECIP_K3 [8] = '{4'd15, 4'd14, 4'd12, 4'd11,
                                          4'd10, 4'd9,  4'd9,  4'd8};

  // Constant for range index idx, in units of 2^-(k+1). Returns 0 for an
  // unsupported k.
  function automatic int unsigned recip_const(input int unsigned k,
                                              input logic [2:0] idx);
    if (k == 2) return int'(RECIP_K2[idx[1:0]]);
    if (k == 3) return int'(RECIP_K3[idx[2:0]]);
    return 0;
  endfunction

  // Exponent bias of an FP format with ne exponent bits (IEEE 754 rule).
  function automatic int unsigned fp_bias(input int unsigned ne);
    return (1 << (ne - 1)) - 1;
  endfunction

endpackage
