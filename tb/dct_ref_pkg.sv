// dct_ref_pkg: floating-point reference for the DCT testbenches.
//
// Orthonormal 8-point DCT-II and its inverse, computed directly from the cosine
// definition with real arithmetic, plus rounding and clipping helpers. The core
// computes sqrt(8) times these per 1-D pass (with extra scale factors that each
// testbench applies), and the orthonormal 2-D DCT end to end.
package dct_ref_pkg;

  typedef real rvec_t [8];
  typedef real rmat_t [8][8];

  localparam real PI = 3.14159265358979323846;

  function automatic real ck(int k);
    return (k == 0) ? $sqrt(0.125) : 0.5;
  endfunction

  function automatic rvec_t dct8(rvec_t x);
    rvec_t y;
    for (int k = 0; k < 8; k++) begin
      y[k] = 0.0;
      for (int n = 0; n < 8; n++) y[k] += x[n] * $cos((2 * n + 1) * k * PI / 16.0);
      y[k] *= ck(k);
    end
    return y;
  endfunction

  function automatic rvec_t idct8(rvec_t y);
    rvec_t x;
    for (int n = 0; n < 8; n++) begin
      x[n] = 0.0;
      for (int k = 0; k < 8; k++) x[n] += ck(k) * y[k] * $cos((2 * n + 1) * k * PI / 16.0);
    end
    return x;
  endfunction

  // 2-D transform of m[row][col]; inv selects the inverse.
  function automatic rmat_t dct2(rmat_t m, bit inv);
    rmat_t t, r;
    rvec_t v, o;
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) v[j] = m[i][j];
      o = inv ? idct8(v) : dct8(v);
      for (int j = 0; j < 8; j++) t[i][j] = o[j];
    end
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) v[i] = t[i][j];
      o = inv ? idct8(v) : dct8(v);
      for (int i = 0; i < 8; i++) r[i][j] = o[i];
    end
    return r;
  endfunction

  function automatic int rnd(real v);
    return int'($floor(v + 0.5));
  endfunction

  function automatic int clip(int v, int w);
    int hi, lo;
    hi = (1 <<< (w - 1)) - 1;
    lo = -(1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // uniform random integer in [lo, hi]
  function automatic int urange(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

endpackage
