// lpcad_top: the two LPCAD approximate dividers side by side.
//
//   fp_*  : half-precision floating-point divider, LPCAD(3,8)
//           (FP(1,5,10), 3 divisor bits select the reciprocal constant,
//           8 fraction bits kept in the truncated datapath).
//   int_* : unsigned 16/8 integer divider built around the same core
//           (leading-one detectors and barrel shifters around an internal
//           FP LPCAD(3,8) with a 15-bit fraction).
//
// The two are independent and share nothing but the method. Both are purely
// combinational: outputs follow inputs after the propagation delay, there is
// no clock. Formats and flags are described in lpcad_fp_div and
// lpcad_int_div.
module lpcad_top #(
  parameter int unsigned FP_NE  = 5,
  parameter int unsigned FP_NM  = 10,
  parameter int unsigned FP_K   = 3,
  parameter int unsigned FP_T   = 8,
  parameter int unsigned INT_WA = 16,
  parameter int unsigned INT_WB = 8,
  parameter int unsigned INT_K  = 3,
  parameter int unsigned INT_T  = 8,
  localparam int unsigned FW = 1 + FP_NE + FP_NM
) (
  input  logic [FW-1:0]     fp_a,
  input  logic [FW-1:0]     fp_b,
  output logic [FW-1:0]     fp_q,
  output logic              fp_exp_ovf,
  output logic              fp_exp_unf,
  input  logic [INT_WA-1:0] int_a,
  input  logic [INT_WB-1:0] int_b,
  output logic [INT_WA-1:0] int_q,
  output logic              int_div_by_zero
);

  lpcad_fp_div #(.NE(FP_NE), .NM(FP_NM), .K(FP_K), .T(FP_T)) u_fp_div (
    .a(fp_a), .b(fp_b), .q(fp_q), .exp_ovf(fp_exp_ovf), .exp_unf(fp_exp_unf)
  );

  lpcad_int_div #(.WA(INT_WA), .WB(INT_WB), .K(INT_K), .T(INT_T)) u_int_div (
    .a(int_a), .b(int_b), .q(int_q), .div_by_zero(int_div_by_zero)
  );

endmodule
