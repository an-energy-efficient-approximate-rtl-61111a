// lpcad_trunc_mult: dedicated truncated multiplier of the LPCAD divider.
//
// Forms P = S x C, where S = s0.s-1..s-NM is the signed mantissa difference
// and C = 0.c-1..c-(K+1) the unsigned reciprocal constant. Because the
// integer bit of C is 0, the product reduces to
//   P = -s0 * sum_j c-j 2^-j  +  sum_j sum_i s-i c-j 2^-(i+j).
// The negative term is folded into the partial-product array by the usual
// sign-complement trick: row j carries NOT(s0 c-j) in column 2^-j, the last
// row carries NOT(s0 c-(K+1)) in column 2^-K plus s0 c-(K+1) in column
// 2^-(K+1), and a constant 1 sits in column 2^0. All arithmetic is modulo 2,
// giving P as a two's-complement number p0.p-1..p-W.
//
// Truncation: only columns 2^0 .. 2^-W are built and summed, W = min(T+1,
// NM+K+1); partial-product bits of lower weight are dropped, so P is never
// above the exact product. With T >= NM+K the product is exact. T >= K is
// required so that every sign-correction bit falls in a kept column.
// The column sum is written as a sum of the K+2 rows and left to synthesis
// to map onto a carry-save tree. The array itself follows the method; the
// choice of the cut at 2^-(T+1) is this design's reading of the truncation
// width (the columns that feed the output window).
//
// Output p: p[W] = p0, p[W-i] = p-i. Purely combinational.
module lpcad_trunc_mult #(
  parameter int unsigned NM = 10,
  parameter int unsigned K  = 3,
  parameter int unsigned T  = 8,
  localparam int unsigned W = (T + 1 < NM + K + 1) ? T + 1 : NM + K + 1
) (
  input  logic [NM:0] s,   // s[NM] = s0 (sign), s[NM-i] = s-i
  input  logic [K:0]  c,   // c[K+1-j] = c-j
  output logic [W:0]  p    // p[W] = p0, p[W-i] = p-i
);

  if (T < K) begin : g_bad_t
    $error("lpcad_trunc_mult: T must be at least K");
  end

  logic s0;
  logic [W:0] row [K+2];

  always_comb begin
    s0 = s[NM];
    for (int j = 1; j <= K + 1; j++) begin
      row[j-1] = '0;
      // magnitude partial products s-i * c-j, weight 2^-(i+j)
      for (int i = 1; i <= NM; i++) begin
        if (i + j <= W)
          row[j-1][W-i-j] = s[NM-i] & c[K+1-j];
      end
      // complemented sign bits
      if (j <= K) begin
        row[j-1][W-j] = ~(s0 & c[K+1-j]);
      end else begin
        row[j-1][W-K]   = ~(s0 & c[0]);
        row[j-1][W-K-1] = s0 & c[0];
      end
    end
    // constant 1 in the integer column
    row[K+1] = '0;
    row[K+1][W] = 1'b1;

    p = '0;
    for (int r = 0; r < K + 2; r++) p = p + row[r];
  end

endmodule
