// dwt53_ref_pkg: reference model of the 5/3 wavelet transform used by the
// testbenches. It works on plain integers with direct multiplications (no
// CSD, no delay line), so it is independent of the RTL arithmetic:
//   L[k] = sat((-x[2k-2] + 2x[2k-1] + 6x[2k] + 2x[2k+1] - x[2k+2] + 4) >>> 3)
//   H[k] = sat((-x[2k] + 2x[2k+1] - x[2k+2] + 1) >>> 1)
// with whole-sample symmetric extension at both ends and saturation to a
// signed word of the given width. A transformed line holds the low-pass
// values in its first half and the high-pass values in its second half.
package dwt53_ref_pkg;

  function automatic int ref_sat(input int v, input int dw);
    int hi, lo;
    hi = (1 << (dw - 1)) - 1;
    lo = -(1 << (dw - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  function automatic int ref_mirror(input int j, input int m);
    if (j < 0)  return -j;
    if (j >= m) return 2 * m - 2 - j;
    return j;
  endfunction

  // Coefficient n of a line (even n: low pass, odd n: high pass).
  function automatic int ref_coef(ref int x[$], input int n, input int dw);
    int m, a, b, c, d, e;
    m = x.size();
    a = x[ref_mirror(n - 2, m)];
    b = x[ref_mirror(n - 1, m)];
    c = x[n];
    d = x[ref_mirror(n + 1, m)];
    e = x[ref_mirror(n + 2, m)];
    if (n % 2 == 0) return ref_sat((-1 * a + 2 * b + 6 * c + 2 * d - 1 * e + 4) >>> 3, dw);
    else            return ref_sat((-1 * b + 2 * c - 1 * d + 1) >>> 1, dw);
  endfunction

  // Transform a line in place: low half first, high half second.
  function automatic void ref_line(ref int x[$], input int dw);
    int y[$];
    int m;
    m = x.size();
    y = x;
    for (int n = 0; n < m; n++) begin
      if (n % 2 == 0) y[n / 2] = ref_coef(x, n, dw);
      else            y[m / 2 + (n - 1) / 2] = ref_coef(x, n, dw);
    end
    x = y;
  endfunction

endpackage
