// tb_lpcad_image_apps: the three image-processing uses of the divider, run
// on synthetic 64x64 grayscale images generated here (smooth gradients,
// bright blobs, pseudo-random texture; pixels kept in 1..255 because the
// divider has no zero operand).
//
//  * Change detection, FP16 LPCAD(3,4) and the default LPCAD(3,8): the ratio
//    of two frames (the second with a changed square and a global brightness
//    shift) is mapped to an 8-bit image, out = min(255, 96 * ratio), and a
//    pixel is "changed" when the ratio leaves [0.8, 1.25]. Reported: PSNR of
//    the output against exact division, and agreement of the change mask.
//  * Foreground extraction, FP16 LPCAD(3,10): frame / background ratio
//    image, same mapping; PSNR against exact division.
//  * K-means colour quantisation, FP32 LPCAD(3,8): 1-D k-means with 4
//    clusters and 8 iterations, every centre update (cluster sum / count)
//    done by the divider; the quantised image is compared, as PSNR, with
//    the one obtained with exact division.
// Pass criteria (this testbench's own): PSNR >= 30 dB for the change and
// foreground images, >= 28 dB for k-means, mask agreement >= 97 %. Every
// divider quotient is also checked bit for bit against the reference model.
module tb_lpcad_image_apps;
  import tb_lpcad_ref_pkg::*;

  localparam int SZ = 64;
  localparam int NP = SZ * SZ;
  localparam int NCL = 4;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // ---- dividers under test ----
  logic [15:0] h_a, h_b, h_q4, h_q8, h_q10;
  logic        h_o4, h_u4, h_o8, h_u8, h_o10, h_u10;
  logic [31:0] s_a, s_b, s_q;
  logic        s_o, s_u;

  lpcad_fp_div #(.NE(5), .NM(10), .K(3), .T(4))  d_cd4 (.a(h_a), .b(h_b), .q(h_q4),  .exp_ovf(h_o4),  .exp_unf(h_u4));
  lpcad_fp_div                                   d_cd8 (.a(h_a), .b(h_b), .q(h_q8),  .exp_ovf(h_o8),  .exp_unf(h_u8));
  lpcad_fp_div #(.NE(5), .NM(10), .K(3), .T(10)) d_fg  (.a(h_a), .b(h_b), .q(h_q10), .exp_ovf(h_o10), .exp_unf(h_u10));
  lpcad_fp_div #(.NE(8), .NM(23), .K(3), .T(8))  d_km  (.a(s_a), .b(s_b), .q(s_q),   .exp_ovf(s_o),   .exp_unf(s_u));

  // ---- number conversion helpers ----
  function automatic int ilog2(longint v);
    int r = 0;
    while (v > 1) begin v = v >> 1; r++; end
    return r;
  endfunction

  // positive integer (< 2^NM+1) to FP with NE/NM fields, exact
  function automatic logic [31:0] int_to_fp(longint v, int ne, int nm);
    int e = ilog2(v);
    longint frac = ((v << nm) >> e) & ((longint'(1) << nm) - 1);
    longint bexp = longint'(e + (1 << (ne - 1)) - 1);
    return 32'((bexp << nm) | frac);
  endfunction

  function automatic real fp_to_real(logic [31:0] x, int ne, int nm);
    int  be = int'((x >> nm) & ((1 << ne) - 1));
    real v = 1.0 + real'(x & ((32'd1 << nm) - 1)) / real'(longint'(1) << nm);
    int  e = be - ((1 << (ne - 1)) - 1);
    for (; e > 0; e--) v = v * 2.0;
    for (; e < 0; e++) v = v / 2.0;
    return v;
  endfunction

  // bit-exact expectation for the FP LPCAD divider (positive operands)
  function automatic logic [31:0] ref_div(logic [31:0] x, logic [31:0] y, int ne, int nm, int k, int t);
    longint msk = (longint'(1) << nm) - 1;
    longint am = longint'(x) & msk, bm = longint'(y) & msk;
    int ae = int'(x >> nm), be = int'(y >> nm);
    int e = ae - be - ((mant_diff(am, bm, nm, t) < 0) ? 1 : 0) + (1 << (ne - 1)) - 1;
    return 32'(((longint'(e) & ((longint'(1) << ne) - 1)) << nm) | quot_mant(am, bm, nm, k, t));
  endfunction

  function automatic int to_pix(real r);
    real v = 96.0 * r;
    if (v > 255.0) v = 255.0;
    return int'($floor(v));
  endfunction

  function automatic real psnr(real mse);
    if (mse <= 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  // ---- synthetic images ----
  int img1 [NP], img2 [NP], bg [NP];

  function automatic int clamp_pix(int v);
    if (v < 1) return 1;
    if (v > 255) return 255;
    return v;
  endfunction

  task automatic make_images();
    for (int y = 0; y < SZ; y++)
      for (int x = 0; x < SZ; x++) begin
        int base, tex, d2;
        tex  = int'($urandom_range(0, 24)) - 12;
        base = 40 + 2 * x + y + tex;
        d2   = (x - 20) * (x - 20) + (y - 40) * (y - 40);
        if (d2 < 100) base += 90;
        img1[y*SZ+x] = clamp_pix(base);
        // second frame: brighter by 5 %, with a changed square
        if (x > 40 && x < 56 && y > 8 && y < 24) img2[y*SZ+x] = clamp_pix(30 + 2 * y);
        else img2[y*SZ+x] = clamp_pix((base * 105) / 100 + int'($urandom_range(0, 4)) - 2);
        // background for foreground extraction: the frame without the blob
        bg[y*SZ+x] = clamp_pix(40 + 2 * x + y + tex);
      end
  endtask

  // ---- one FP16 division through all three half-precision instances ----
  task automatic div16(int p, int q, output real r4, output real r8, output real r10);
    h_a = 16'(int_to_fp(longint'(p), 5, 10));
    h_b = 16'(int_to_fp(longint'(q), 5, 10));
    #1;
    checks++;
    if (32'(h_q4) != ref_div(32'(h_a), 32'(h_b), 5, 10, 3, 4) ||
        32'(h_q8) != ref_div(32'(h_a), 32'(h_b), 5, 10, 3, 8) ||
        32'(h_q10) != ref_div(32'(h_a), 32'(h_b), 5, 10, 3, 10)) begin
      failures++;
      if (failures < 10) $display("FAIL fp16 %0d/%0d", p, q);
    end
    r4  = fp_to_real(32'(h_q4), 5, 10);
    r8  = fp_to_real(32'(h_q8), 5, 10);
    r10 = fp_to_real(32'(h_q10), 5, 10);
  endtask

  task automatic div32(longint p, longint q, output real r);
    s_a = int_to_fp(p, 8, 23);
    s_b = int_to_fp(q, 8, 23);
    #1;
    checks++;
    if (s_q != ref_div(s_a, s_b, 8, 23, 3, 8)) begin
      failures++;
      if (failures < 10) $display("FAIL fp32 %0d/%0d", p, q);
    end
    r = fp_to_real(s_q, 8, 23);
  endtask

  // ---- k-means, approximate (use_div = 1) or exact ----
  task automatic kmeans(bit use_div, output int qimg [NP]);
    real cen [NCL];
    longint sum [NCL];
    longint cnt [NCL];
    for (int c = 0; c < NCL; c++) cen[c] = 30.0 + 60.0 * c;
    for (int it = 0; it < 8; it++) begin
      for (int c = 0; c < NCL; c++) begin sum[c] = 0; cnt[c] = 0; end
      for (int i = 0; i < NP; i++) begin
        int best = 0;
        real bd = 1.0e9;
        for (int c = 0; c < NCL; c++) begin
          real d = (real'(img1[i]) - cen[c]) * (real'(img1[i]) - cen[c]);
          if (d < bd) begin bd = d; best = c; end
        end
        sum[best] += img1[i];
        cnt[best] += 1;
      end
      for (int c = 0; c < NCL; c++) begin
        if (cnt[c] > 0) begin
          if (use_div) begin
            real r;
            div32(sum[c], cnt[c], r);
            cen[c] = r;
          end else begin
            cen[c] = real'(sum[c]) / real'(cnt[c]);
          end
        end
      end
    end
    for (int i = 0; i < NP; i++) begin
      int best = 0;
      real bd = 1.0e9;
      for (int c = 0; c < NCL; c++) begin
        real d = (real'(img1[i]) - cen[c]) * (real'(img1[i]) - cen[c]);
        if (d < bd) begin bd = d; best = c; end
      end
      qimg[i] = int'($floor(cen[best] + 0.5));
    end
  endtask

  initial begin
    real se4, se8, se10, agree4, agree8;
    real p_cd4, p_cd8, p_fg, p_km, a4, a8, mse;
    int  q_ex [NP], q_ap [NP];
    int  n_changed;
    make_images();

    // change detection and foreground extraction
    se4 = 0; se8 = 0; se10 = 0; agree4 = 0; agree8 = 0; n_changed = 0;
    for (int i = 0; i < NP; i++) begin
      real r4, r8, r10, ex;
      bit  ch_ex, ch4, ch8;
      div16(img2[i], img1[i], r4, r8, r10);
      ex = real'(img2[i]) / real'(img1[i]);
      se4 += (to_pix(r4) - to_pix(ex)) ** 2;
      se8 += (to_pix(r8) - to_pix(ex)) ** 2;
      ch_ex = ex < 0.8 || ex > 1.25;
      ch4 = r4 < 0.8 || r4 > 1.25;
      ch8 = r8 < 0.8 || r8 > 1.25;
      if (ch_ex) n_changed++;
      if (ch4 == ch_ex) agree4 += 1.0;
      if (ch8 == ch_ex) agree8 += 1.0;
      // foreground: frame / background
      div16(img1[i], bg[i], r4, r8, r10);
      ex = real'(img1[i]) / real'(bg[i]);
      se10 += (to_pix(r10) - to_pix(ex)) ** 2;
    end
    p_cd4 = psnr(se4 / NP); p_cd8 = psnr(se8 / NP); p_fg = psnr(se10 / NP);
    a4 = 100.0 * agree4 / NP; a8 = 100.0 * agree8 / NP;

    // k-means
    kmeans(1'b0, q_ex);
    kmeans(1'b1, q_ap);
    mse = 0;
    for (int i = 0; i < NP; i++) mse += real'((q_ap[i] - q_ex[i]) ** 2);
    p_km = psnr(mse / NP);

    $display("change detection  LPCAD(3,4) : PSNR %5.1f dB, mask agreement %5.2f %% (%0d changed pixels)", p_cd4, a4, n_changed);
    $display("change detection  LPCAD(3,8) : PSNR %5.1f dB, mask agreement %5.2f %%", p_cd8, a8);
    $display("foreground        LPCAD(3,10): PSNR %5.1f dB", p_fg);
    $display("k-means FP32      LPCAD(3,8) : PSNR %5.1f dB against exact division", p_km);

    checks += 6;
    if (n_changed == 0) begin failures++; $display("FAIL no changed pixels in the test pair"); end
    if (p_cd4 < 30.0 || p_cd8 < 30.0) begin failures++; $display("FAIL change detection PSNR"); end
    if (a4 < 97.0 || a8 < 97.0) begin failures++; $display("FAIL change mask agreement"); end
    if (p_cd8 < p_cd4) begin failures++; $display("FAIL T=8 should not be worse than T=4"); end
    if (p_fg < 30.0) begin failures++; $display("FAIL foreground PSNR"); end
    if (p_km < 28.0) begin failures++; $display("FAIL k-means PSNR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
