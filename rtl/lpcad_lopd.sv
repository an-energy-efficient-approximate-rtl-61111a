// lpcad_lopd: leading-one position detector.
//
// Returns the bit index of the most significant 1 of x (the integer part of
// log2 x), and zero = 1 when x has no 1 (pos is then 0). Used to extract the
// exponent of an unsigned integer before it enters the floating-point LPCAD
// core. Written as a priority scan from the LSB up, so the last 1 seen wins;
// the method only names the detector, so this structure (and the zero flag)
// is a choice of this design. Purely combinational.
module lpcad_lopd #(
  parameter int unsigned W  = 16,
  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  x,
  output logic [PW-1:0] pos,
  output logic          zero
);
  always_comb begin
    pos  = '0;
    zero = 1'b1;
    for (int i = 0; i < W; i++) begin
      if (x[i]) begin
        pos  = PW'(i);
        zero = 1'b0;
      end
    end
  end
endmodule
