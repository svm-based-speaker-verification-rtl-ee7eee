// svm_ref_pkg: reference model of the SVM engine's fixed-point arithmetic for
// the testbenches. It recomputes, in plain behavioural code, what each
// block should produce: the exponential table from $exp, the RBF kernel, the
// Q16.16 divide and multiply-subtract, Gauss-Jordan elimination with full
// pivoting, support vector selection and the test score.
package svm_ref_pkg;

  localparam int NM = 32;          // largest K' order (N_MAX + 1)
  localparam int NC = 33;          // K' row stride (N_MAX + 2)

  typedef int mat_t [NM][NC];

  function automatic int r_sat(longint v);
    if (v > 64'sd2147483647)  return 32'sh7fffffff;
    if (v < -64'sd2147483647) return -32'sh7fffffff;
    return int'(v);
  endfunction

  function automatic int r_mul(int a, int b);
    return r_sat((longint'(a) * longint'(b)) >>> 16);
  endfunction

  function automatic int r_exp(longint idx);
    real x;
    if (idx >= 256 || idx < 0) return 0;
    x = 65536.0 * $exp(-real'(idx) / 16.0);
    return int'($rtoi(x + 0.5));
  endfunction

  // squared distance of two vectors in Q16.16, each term floored
  typedef int vec_t [64];

  function automatic longint r_dist(vec_t a, vec_t b, int d);
    longint acc = 0;
    for (int e = 0; e < d; e++) begin
      longint df = longint'(a[e]) - longint'(b[e]);
      acc += (df * df) >>> 16;
    end
    if (acc > 64'hFFFF_FFFF_FFFF) acc = 64'hFFFF_FFFF_FFFF;
    return acc;
  endfunction

  // kernel value from a squared distance (sigma = 8, 2 sigma^2 = 128)
  function automatic int r_kval(longint d2);
    return r_exp(d2 >>> 19);
  endfunction

  function automatic int r_div(int a, int p);
    longint q;
    if (p == 0) return ((a < 0) != (p < 0)) ? -32'sh7fffffff : 32'sh7fffffff;
    q = (longint'(a) <<< 16) / longint'(p);     // truncates toward zero
    return r_sat(q);
  endfunction

  function automatic int r_calc(int a, int f, int p);
    return r_sat(longint'(a) - ((longint'(f) * longint'(p)) >>> 16));
  endfunction

  // Gauss-Jordan with full pivoting on an n x (n+1) augmented matrix.
  function automatic void r_gj(ref mat_t m, input int n, output bit sing, output int nswaps);
    bit piv [NM];
    sing   = 0;
    nswaps = 0;
    for (int i = 0; i < NM; i++) piv[i] = 0;
    for (int step = 0; step < n; step++) begin
      longint best = 0;
      int irow = 0, icol = 0, pv;
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++)
          if (!piv[r] && !piv[c]) begin
            longint mg = (m[r][c] < 0) ? -longint'(m[r][c]) : longint'(m[r][c]);
            if (mg > best) begin best = mg; irow = r; icol = c; end
          end
      if (best == 0) begin sing = 1; return; end
      if (irow != icol) begin
        nswaps++;
        for (int c = 0; c < n + 1; c++) begin
          int t = m[irow][c]; m[irow][c] = m[icol][c]; m[icol][c] = t;
        end
      end
      pv = m[icol][icol];
      for (int c = 0; c < n + 1; c++) m[icol][c] = r_div(m[icol][c], pv);
      piv[icol] = 1;
      for (int r = 0; r < n; r++)
        if (r != icol) begin
          int f = m[r][icol];
          for (int c = 0; c < n + 1; c++) m[r][c] = r_calc(m[r][c], f, m[icol][c]);
        end
    end
  endfunction

endpackage
