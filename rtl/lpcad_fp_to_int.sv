// lpcad_fp_to_int: output barrel shifter of the integer LPCAD divider.
//
// Converts the quotient (1.m) * 2^e, with e a signed two's-complement
// exponent, to an unsigned integer by shifting the significand and dropping
// the fraction bits (rounding toward zero). e < 0 gives 0; a value that does
// not fit in WQ bits saturates to all ones. The method only calls for a
// barrel shifter here; rounding toward zero and saturation are choices of
// this design. Purely combinational.
module lpcad_fp_to_int #(
  parameter int unsigned NM = 15,  // fraction width
  parameter int unsigned WE = 6,   // exponent width (signed)
  parameter int unsigned WQ = 16   // integer result width
) (
  input  logic signed [WE-1:0] e,
  input  logic [NM-1:0]        m,
  output logic [WQ-1:0]        q
);
  localparam int unsigned WW = NM + 1 + WQ;

  logic [WW-1:0] wide;

  always_comb begin
    wide = '0;
    q    = '0;
    if (e < 0) begin
      q = '0;
    end else if (e >= WE'(WQ)) begin
      q = '1;
    end else begin
      // 1.m aligned so that bit NM has weight 2^0, then shifted by e
      wide = WW'({1'b1, m}) << e;
      q    = WQ'(wide >> NM);
    end
  end
endmodule
