// idct_ref_pkg: floating-point reference models for the IDCT testbenches.
//
// Everything here is computed directly from the transform definitions with
// $cos, independently of the coefficient tables and schedule of the RTL:
//   dct_c(k,n)      = 1/2 c(k) cos((2n+1) k pi / 16), c(0) = 1/sqrt(2)
//   idct8(X)[n]     = sum_k dct_c(k,n) X[k]          (orthonormal 1-D IDCT)
//   fdct8x8 / idct8x8 : separable 2-D transforms in double precision
// plus the pseudo-random generator of the IEEE 1180-1990 accuracy test
// (a 32-bit linear congruential generator, x = x*1103515245 + 12345, scaled
// to the integer range [-L, H]).
package idct_ref_pkg;

  typedef real blk_t [8][8];

  function automatic real dct_c(input int k, input int n);
    real c;
    c = (k == 0) ? $sqrt(0.5) : 1.0;
    return 0.5 * c * $cos((2.0 * n + 1.0) * k * 3.14159265358979323846 / 16.0);
  endfunction

  function automatic blk_t fdct8x8(input blk_t p);
    blk_t t, f;
    for (int u = 0; u < 8; u++)
      for (int y = 0; y < 8; y++) begin
        t[u][y] = 0.0;
        for (int x = 0; x < 8; x++) t[u][y] += dct_c(u, x) * p[x][y];
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        f[u][v] = 0.0;
        for (int y = 0; y < 8; y++) f[u][v] += dct_c(v, y) * t[u][y];
      end
    return f;
  endfunction

  function automatic blk_t idct8x8(input blk_t f);
    blk_t t, p;
    for (int m = 0; m < 8; m++)
      for (int v = 0; v < 8; v++) begin
        t[m][v] = 0.0;
        for (int u = 0; u < 8; u++) t[m][v] += dct_c(u, m) * f[u][v];
      end
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++) begin
        p[m][n] = 0.0;
        for (int v = 0; v < 8; v++) p[m][n] += dct_c(v, n) * t[m][v];
      end
    return p;
  endfunction

  // Round half away from zero, as the reference of the accuracy test does.
  function automatic int round_int(input real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // IEEE 1180 random number generator.
  class ieee_rand;
    longint unsigned x = 1;
    function int next(input int lo_l, input int hi_h);
      longint unsigned i;
      real r;
      x = (x * 64'd1103515245 + 64'd12345) & 64'hFFFF_FFFF;
      i = x & 64'h7FFF_FFFE;
      r = real'(i) / real'(32'h7FFF_FFFF);
      r = r * (lo_l + hi_h + 1);
      return int'($floor(r)) - lo_l;
    endfunction
  endclass

endpackage
