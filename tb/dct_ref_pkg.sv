// dct_ref_pkg: double-precision reference models for the testbenches.
//
// Everything here is computed straight from the transform definitions with
// real arithmetic, independently of the fixed-point structure of the RTL:
// the orthonormal 8x8 2-D DCT and IDCT, the 1-D kernels in the permuted
// order, the index maps, and a 31-bit LFSR-free random helper.
package dct_ref_pkg;

  typedef int  iblk_t [8][8];
  typedef real rblk_t [8][8];

  localparam real PI = 3.14159265358979323846;

  function automatic real cosr(real num);   // cos(num * pi / 16)
    return $cos(PI * num / 16.0);
  endfunction

  function automatic real ck(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  function automatic int rnd(real v);       // round half away from zero
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int rand_range(int lo, int hi);
    return lo + int'($urandom % unsigned'(hi - lo + 1));
  endfunction

  // X[k1][k2] = 1/4 c(k1) c(k2) sum x[a][b] cos((2a+1)k1 pi/16) cos((2b+1)k2 pi/16)
  function automatic rblk_t ref_dct(iblk_t x);
    rblk_t t, r;
    for (int a = 0; a < 8; a++)
      for (int k = 0; k < 8; k++) begin
        t[a][k] = 0.0;
        for (int b = 0; b < 8; b++) t[a][k] += real'(x[a][b]) * cosr(real'((2 * b + 1) * k));
        t[a][k] *= 0.5 * ck(k);
      end
    for (int k1 = 0; k1 < 8; k1++)
      for (int k2 = 0; k2 < 8; k2++) begin
        r[k1][k2] = 0.0;
        for (int a = 0; a < 8; a++) r[k1][k2] += t[a][k2] * cosr(real'((2 * a + 1) * k1));
        r[k1][k2] *= 0.5 * ck(k1);
      end
    return r;
  endfunction

  // x[a][b] = sum 1/4 c(k1) c(k2) X[k1][k2] cos((2a+1)k1 pi/16) cos((2b+1)k2 pi/16)
  function automatic rblk_t ref_idct(iblk_t cx);
    rblk_t t, r;
    for (int k1 = 0; k1 < 8; k1++)
      for (int b = 0; b < 8; b++) begin
        t[k1][b] = 0.0;
        for (int k2 = 0; k2 < 8; k2++)
          t[k1][b] += 0.5 * ck(k2) * real'(cx[k1][k2]) * cosr(real'((2 * b + 1) * k2));
      end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        r[a][b] = 0.0;
        for (int k1 = 0; k1 < 8; k1++)
          r[a][b] += 0.5 * ck(k1) * t[k1][b] * cosr(real'((2 * a + 1) * k1));
      end
    return r;
  endfunction

  // Data order of the transform on one axis and the per-row index map.
  function automatic int pmap_ref(int n);
    int lst [8] = '{0, 2, 4, 6, 7, 5, 3, 1};
    return lst[n];
  endfunction

  function automatic int tmap_ref(int n1, int t);
    for (int n2 = 0; n2 < 8; n2++)
      if ((4 * n2 + 1) == ((4 * t + 1) * (4 * n1 + 1)) % 32) return n2;
    return -1;
  endfunction

  // Check bookkeeping shared by the unit testbenches.
  int checks = 0;
  int failures = 0;

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endfunction

  function automatic void report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  function automatic bit near(real got, real want, real tol);
    return (got - want <= tol) && (want - got <= tol);
  endfunction

  // W32^e as (cos, -sin) of 2*pi*e/32
  function automatic real wre(int e);
    return $cos(2.0 * PI * real'(e) / 32.0);
  endfunction
  function automatic real wim(int e);
    return -$sin(2.0 * PI * real'(e) / 32.0);
  endfunction

  // Unscaled 2-D DCT Y(k1,k2) of a block, by definition.
  function automatic real ydef(iblk_t x, int k1, int k2);
    real acc = 0.0;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        acc += real'(x[a][b]) * cosr(real'((2 * a + 1) * k1)) * cosr(real'((2 * b + 1) * k2));
    return acc;
  endfunction

  // U(k1,k2) = sum y(n1,n2) W32^((4n1+1)k1 + (4n2+1)k2), y the permuted block.
  function automatic void udef(iblk_t x, int k1, int k2, output real re, output real im);
    re = 0.0;
    im = 0.0;
    for (int n1 = 0; n1 < 8; n1++)
      for (int n2 = 0; n2 < 8; n2++) begin
        int e = (4 * n1 + 1) * k1 + (4 * n2 + 1) * k2;
        re += real'(x[pmap_ref(n1)][pmap_ref(n2)]) * wre(e);
        im += real'(x[pmap_ref(n1)][pmap_ref(n2)]) * wim(e);
      end
  endfunction

  // u(n1,k2) = sum_t y(n1,t) W32^((4n1+1)*4t*k2) for a mapped row y(n1,.).
  function automatic void uset(int row [8], int n1, int k2, output real re, output real im);
    re = 0.0;
    im = 0.0;
    for (int t = 0; t < 8; t++) begin
      re += real'(row[t]) * wre((4 * n1 + 1) * 4 * t * k2);
      im += real'(row[t]) * wim((4 * n1 + 1) * 4 * t * k2);
    end
  endfunction

endpackage
