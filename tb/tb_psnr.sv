// tb_psnr: JPEG-style PSNR test of the core's FDCT and IDCT on a synthetic image.
//
// A 128x128 8-bit grey image is generated from a formula: two smooth sine patterns,
// a fine diagonal texture, a sharp-edged rectangle and uniform noise of +-6, so that
// it holds flat areas, edges and detail. Its 256 8x8 blocks are level-shifted by
// -128 and sent through the core as FDCT matrices. Each coefficient must be within
// 1 of the exact orthonormal DCT, rounded.
// For JPEG quality 50, 75 and 100 the coefficients are quantised and dequantised
// with the standard JPEG luminance table, scaled the usual way:
//   scale = 5000/Q for Q < 50, else 200 - 2Q;  q = clamp((base*scale + 50)/100, 1, 255).
// The image is rebuilt from them in two ways, and each is compared with the
// original by PSNR = 10 log10(255^2 / MSE):
//   "core FDCT"  : the core's coefficients, rebuilt with the exact IDCT;
//   "round trip" : the core's coefficients, rebuilt with the core's own IDCT.
// The reference is the same flow with the exact FDCT. The core FDCT must come within
// 0.1 dB of it and the round trip within 0.3 dB. At quality 100 every PSNR must
// exceed 50 dB. All matrices are sent back to back (one per 8 cycles) with the
// output always ready, and every PSNR is printed.
module tb_psnr;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int IMG = 128;
  localparam int NB  = (IMG / 8) * (IMG / 8);

  // JPEG luminance quantisation table at quality 50, row-major
  localparam int QBASE [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b1, m_last;
  dir_e s_dir = DIR_FDCT, m_dir;
  pix_t s_data [N], m_data [N];
  tb_state_e tbuf_state;

  dct2d_2x u_dut (.clk, .rst_n, .s_valid, .s_ready, .s_dir, .s_data,
                  .m_valid, .m_ready, .m_dir, .m_data, .m_last, .tbuf_state);

  int img     [IMG][IMG];
  int in_blk  [NB][8][8];
  int out_blk [NB][8][8];
  int coef    [NB][8][8];   // core FDCT
  int coef_x  [NB][8][8];   // exact FDCT, rounded
  int ob = 0, oline = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NB * 8 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result columns out: line k holds column k of the result
  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) begin
      for (int u = 0; u < 8; u++) out_blk[ob][u][oline] = int'(m_data[u]);
      oline++;
      if (oline == 8) begin
        oline = 0;
        ob++;
      end
    end
  end

  // sends all NB blocks of in_blk back to back and waits for their results
  task automatic run_pass(dir_e dir);
    ob = 0;
    for (int b = 0; b < NB; b++) begin
      for (int row = 0; row < 8; row++) begin
        @(negedge clk);
        s_valid = 1'b1;
        s_dir   = dir;
        for (int k = 0; k < N; k++) s_data[k] = pix_t'(in_blk[b][row][k]);
        @(posedge clk);
        while (!s_ready) @(posedge clk);
      end
    end
    @(negedge clk);
    s_valid = 1'b0;
    wait (ob == NB);
  endtask

  function automatic int px(int b, int i, int j);
    return img[(b / (IMG / 8)) * 8 + i][(b % (IMG / 8)) * 8 + j];
  endfunction

  function automatic real psnr(real sse);
    real mse;
    mse = sse / real'(IMG * IMG);
    if (mse <= 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  // squared error of blocks rebuilt with the exact IDCT from dequantised coefficients
  function automatic real sse_exact_idct(int b, rmat_t d);
    rmat_t r;
    real   s;
    int    p;
    s = 0.0;
    r = dct2(d, 1'b1);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
      p = rnd(r[i][j]) + 128;
      p = (p < 0) ? 0 : (p > 255) ? 255 : p;
      s += real'((p - px(b, i, j)) * (p - px(b, i, j)));
    end
    return s;
  endfunction

  task automatic run_quality(int quality);
    int   qt [8][8];
    int   scale, t, p;
    rmat_t dc, dx;
    real  sse_c, sse_x, sse_rt, p_c, p_x, p_rt;
    scale = (quality < 50) ? 5000 / quality : 200 - 2 * quality;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
      t = (QBASE[i * 8 + j] * scale + 50) / 100;
      qt[i][j] = (t < 1) ? 1 : (t > 255) ? 255 : t;
    end
    sse_c = 0.0; sse_x = 0.0; sse_rt = 0.0;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        dc[i][j] = real'(rnd(real'(coef[b][i][j]) / real'(qt[i][j])) * qt[i][j]);
        dx[i][j] = real'(rnd(real'(coef_x[b][i][j]) / real'(qt[i][j])) * qt[i][j]);
        in_blk[b][i][j] = clip(int'(dc[i][j]), PIX_W);
      end
      sse_c += sse_exact_idct(b, dc);
      sse_x += sse_exact_idct(b, dx);
    end
    run_pass(DIR_IDCT);
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        p = out_blk[b][i][j] + 128;
        p = (p < 0) ? 0 : (p > 255) ? 255 : p;
        sse_rt += real'((p - px(b, i, j)) * (p - px(b, i, j)));
      end
    p_c = psnr(sse_c); p_x = psnr(sse_x); p_rt = psnr(sse_rt);
    $display("quality %3d: exact FDCT %7.3f dB, core FDCT %7.3f dB, core round trip %7.3f dB",
             quality, p_x, p_c, p_rt);
    checks++;
    if (p_c < p_x - 0.1) begin
      failures++;
      $display("  core FDCT more than 0.1 dB below the exact FDCT");
    end
    checks++;
    if (p_rt < p_x - 0.3) begin
      failures++;
      $display("  round trip more than 0.3 dB below the exact flow");
    end
    if (quality == 100) begin
      checks++;
      if (p_c < 50.0 || p_rt < 50.0 || p_x < 50.0) begin
        failures++;
        $display("  PSNR at quality 100 not above 50 dB");
      end
    end
  endtask

  initial begin
    rmat_t m, c;
    real   v;
    // synthetic test image
    for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) begin
      v = 128.0 + 55.0 * $sin(real'(x) / 9.0) * $cos(real'(y) / 13.0)
                + 25.0 * $sin(real'(x + 2 * y) / 2.5)
                + real'(urange(-6, 6));
      if (x >= 40 && x < 90 && y >= 30 && y < 75) v = v - 70.0;
      img[y][x] = (rnd(v) < 0) ? 0 : (rnd(v) > 255) ? 255 : rnd(v);
    end
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        in_blk[b][i][j] = px(b, i, j) - 128;
        m[i][j] = real'(in_blk[b][i][j]);
      end
      c = dct2(m, 1'b0);
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) coef_x[b][i][j] = rnd(c[i][j]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_pass(DIR_FDCT);
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        coef[b][i][j] = out_blk[b][i][j];
        checks++;
        if (iabs(coef[b][i][j] - coef_x[b][i][j]) > 1) begin
          failures++;
          if (failures < 10)
            $display("block %0d F[%0d][%0d]: core %0d, exact %0d", b, i, j,
                     coef[b][i][j], coef_x[b][i][j]);
        end
      end
    run_quality(50);
    run_quality(75);
    run_quality(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
