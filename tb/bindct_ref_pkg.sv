// bindct_ref_pkg: integer reference model of the forward BinDCT-C used by the
// testbenches. It is written with plain multiplications by the dyadic
// numerators followed by an arithmetic shift (floor), independently of the
// shift-and-add operators of the design, and exposes every pipeline stage
// separately as well as the full 1-D and 2-D transforms. A floating-point
// DCT-II is included for accuracy checks.
package bindct_ref_pkg;

  typedef int vec_t [8];
  typedef int blk_t [8][8];

  function automatic int dy(input int x, input int num, input int sh);
    return (x * num) >>> sh;
  endfunction

  // stage 1: {s0..s3, d0..d3}
  function automatic vec_t st1(input vec_t x);
    vec_t y;
    for (int i = 0; i < 4; i++) begin
      y[i]   = x[i] + x[7-i];
      y[4+i] = x[i] - x[7-i];
    end
    return y;
  endfunction

  // stage 2: {e0,e1,e2,e3,d0,m5,m6,d3}
  function automatic vec_t st2(input vec_t a);
    vec_t b;
    int v, m6, m5;
    b[0] = a[0] + a[3];
    b[1] = a[1] + a[2];
    b[2] = a[1] - a[2];
    b[3] = a[0] - a[3];
    v  = a[5] - dy(a[6], 13, 5);
    m6 = a[6] + dy(v, 11, 4);
    m5 = v - dy(m6, 13, 5);
    b[4] = a[4]; b[5] = m5; b[6] = m6; b[7] = a[7];
    return b;
  endfunction

  // stage 3: {X0,X4,X2,X6,h0,h1,h2,h3}
  function automatic vec_t st3(input vec_t a);
    vec_t b;
    int x0, x2;
    x0 = a[0] + a[1];
    x2 = a[3] + dy(a[2], 13, 5);
    b[0] = x0;
    b[1] = (x0 >>> 1) - a[1];
    b[2] = x2;
    b[3] = dy(x2, 11, 5) - a[2];
    b[4] = a[4] + a[6];
    b[5] = a[4] - a[6];
    b[6] = a[7] - a[5];
    b[7] = a[7] + a[5];
    return b;
  endfunction

  // stage 4: X[0..7]
  function automatic vec_t st4(input vec_t a);
    vec_t y;
    int x1, x5;
    y[0] = a[0]; y[4] = a[1]; y[2] = a[2]; y[6] = a[3];
    x1 = a[4] + dy(a[7], 3, 4);
    x5 = a[6] + dy(a[5], 11, 4);
    y[1] = x1;
    y[7] = dy(x1, 3, 4) - a[7];
    y[5] = x5;
    y[3] = a[5] - dy(x5, 15, 5);
    return y;
  endfunction

  function automatic vec_t ref_1d(input vec_t x);
    return st4(st3(st2(st1(x))));
  endfunction

  // 2-D: returns c[v][u], v = vertical (column pass) frequency,
  // u = horizontal (row pass) frequency
  // frac: fraction bits carried through both passes, removed at the end by
  // rounding half up
  function automatic blk_t ref_2d(input blk_t p, input int frac = 0);
    blk_t r, c;
    vec_t t, o;
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) t[j] = p[i][j] * (1 << frac);
      o = ref_1d(t);
      for (int j = 0; j < 8; j++) r[i][j] = o[j];
    end
    for (int u = 0; u < 8; u++) begin
      for (int i = 0; i < 8; i++) t[i] = r[i][u];
      o = ref_1d(t);
      for (int v = 0; v < 8; v++)
        c[v][u] = (frac == 0) ? o[v] : ((o[v] + (1 << (frac - 1))) >>> frac);
    end
    return c;
  endfunction

  // scale of each BinDCT output relative to the unnormalised DCT-II
  // Y[k] = sum x[n] cos((2n+1)k pi/16)
  function automatic real bin_scale(input int k);
    real pi = 3.14159265358979;
    case (k)
      0: return 1.0;
      4: return 1.0 / $sqrt(2.0);
      2: return 1.0 / $cos(pi / 8.0);
      6: return $cos(pi / 8.0);
      1: return 1.0 / $cos(pi / 16.0);
      7: return $cos(pi / 16.0);
      5: return 1.0 / $cos(3.0 * pi / 16.0);
      default: return $cos(3.0 * pi / 16.0);
    endcase
  endfunction

  function automatic real dct_1d(input vec_t x, input int k);
    real pi = 3.14159265358979;
    real acc = 0.0;
    for (int n = 0; n < 8; n++)
      acc += real'(x[n]) * $cos(real'((2 * n + 1) * k) * pi / 16.0);
    return acc * bin_scale(k);
  endfunction

endpackage
