// lpcad_mant_sub: mantissa subtractor of the LPCAD divider.
//
// Computes S = A_M - B_M on the fraction fields as a two's-complement number
// s0.s-1..s-NM in (-1, 1): the subtraction is an adder fed with the inverted
// subtrahend and a carry-in of 1. Before subtracting, both fractions keep only
// their T most significant bits (the lower NM-T bits are taken as 0); with
// T >= NM nothing is truncated. s[NM] = s0 is the sign and tells whether
// A_M < B_M, which drives the exponent carry-in and the output multiplexer.
//
// Subtraction by inverted-operand addition follows the method; applying the
// truncation width T here, at the subtractor inputs, is this design's reading
// of how truncation is applied. Purely combinational.
module lpcad_mant_sub #(
  parameter int unsigned NM = 10,  // fraction width
  parameter int unsigned T  = 8    // fraction bits kept before subtracting
) (
  input  logic [NM-1:0] a_m,
  input  logic [NM-1:0] b_m,
  output logic [NM:0]   s
);
  localparam int unsigned TK = (T < NM) ? T : NM;
  localparam logic [NM-1:0] KEEP = ~((NM)'((1 << (NM - TK)) - 1));

  logic [NM:0] a_ext, b_inv;

  always_comb begin
    a_ext = {1'b0, a_m & KEEP};
    b_inv = ~{1'b0, b_m & KEEP};
    s     = a_ext + b_inv + (NM+1)'(1);
  end

endmodule
