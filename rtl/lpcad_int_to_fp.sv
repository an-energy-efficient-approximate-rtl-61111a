// lpcad_int_to_fp: unsigned integer to (exponent, fraction) converter.
//
// The leading-one detector gives the exponent e = floor(log2 x); a left
// barrel shifter then moves the bits below the leading one to the top of a
// (W-1)-bit fraction, so that x = (1.m) * 2^e. Example, W = 8:
// x = 00101100 gives e = 5 and 1.m = 1.0110000. For x = 0, zero = 1 and
// e, m are 0. The detector-plus-shifter arrangement follows the method; the
// fraction width W-1 and the zero flag are choices of this design. Purely
// combinational.
module lpcad_int_to_fp #(
  parameter int unsigned W  = 16,
  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  x,
  output logic [PW-1:0] e,
  output logic [W-2:0]  m,
  output logic          zero
);
  lpcad_lopd #(.W(W)) u_lopd (
    .x(x), .pos(e), .zero(zero)
  );

  always_comb begin
    // shift the leading one into the MSB; it is then dropped (hidden one)
    m = (W-1)'(x << (PW'(W - 1) - e));
  end
endmodule
