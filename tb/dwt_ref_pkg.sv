// dwt_ref_pkg: reference model of the fixed-point (9,7) lifting DWT, for the
// testbenches.
//
// Works on whole lines and whole images held in arrays, written straight from
// the lifting equations with explicit symmetric extension, independent of the
// streaming, register and buffer organisation of the RTL:
//   d1[n] = o[n]  + P(a,e[n])   + P(a,e[n+1])     e[M]  = e[M-1]
//   s1[n] = e[n]  + P(b,d1[n-1]) + P(b,d1[n])     d1[-1] = d1[0]
//   d2[n] = d1[n] + P(c,s1[n])  + P(c,s1[n+1])    s1[M] = s1[M-1]
//   s2[n] = s1[n] + P(d,d2[n-1]) + P(d,d2[n])     d2[-1] = d2[0]
// with P(k,x) = floor((x*k + 2^11) / 2^12), constants at 12 fractional bits.
// 2-D: rows first (input multiplied by scale: 2^4 for pixels, 1 for the LL
// words of a previous level), then columns; LL is scaled by 1/S^2 and HH by
// S^2 with the same rounding.
package dwt_ref_pkg;

  localparam longint KA = -6497, KB = -217, KC = 3616, KD = 1817;
  localparam longint KS2 = 6199, KIS2 = 2707;

  typedef longint line_t[];

  function automatic longint pm(longint k, longint x);
    return (x * k + 2048) >>> 12;
  endfunction

  // one line of 2M samples -> M lowpass, M highpass (unnormalised)
  function automatic void lift1d(input line_t x, output line_t lo, output line_t hi);
    int m = x.size() / 2;
    longint e[], o[], d1[], s1[], d2[];
    e = new[m]; o = new[m]; d1 = new[m]; s1 = new[m]; d2 = new[m];
    lo = new[m]; hi = new[m];
    for (int n = 0; n < m; n++) begin e[n] = x[2*n]; o[n] = x[2*n+1]; end
    for (int n = 0; n < m; n++) d1[n] = o[n] + pm(KA, e[n]) + pm(KA, e[(n+1 < m) ? n+1 : m-1]);
    for (int n = 0; n < m; n++) s1[n] = e[n] + pm(KB, d1[(n > 0) ? n-1 : 0]) + pm(KB, d1[n]);
    for (int n = 0; n < m; n++) d2[n] = d1[n] + pm(KC, s1[n]) + pm(KC, s1[(n+1 < m) ? n+1 : m-1]);
    for (int n = 0; n < m; n++) lo[n] = s1[n] + pm(KD, d2[(n > 0) ? n-1 : 0]) + pm(KD, d2[n]);
    for (int n = 0; n < m; n++) hi[n] = d2[n];
  endfunction

  // 2-D transform of an n x n image img[r*n + c]; results indexed [m*(n/2) + i]
  function automatic void dwt2d(input int n, input line_t img, input longint scale,
                                output line_t ll, output line_t lh,
                                output line_t hl, output line_t hh);
    int m = n / 2;
    longint rows[];  // row-transformed image, [r*n + c], c < m lowpass
    line_t x, lo, hi;
    rows = new[n*n];
    ll = new[m*m]; lh = new[m*m]; hl = new[m*m]; hh = new[m*m];
    x = new[n];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) x[c] = img[r*n + c] * scale;
      lift1d(x, lo, hi);
      for (int i = 0; i < m; i++) begin rows[r*n + i] = lo[i]; rows[r*n + m + i] = hi[i]; end
    end
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < n; r++) x[r] = rows[r*n + c];
      lift1d(x, lo, hi);
      for (int j = 0; j < m; j++) begin
        if (c < m) begin
          ll[j*m + c]     = pm(KIS2, lo[j]);
          lh[j*m + c]     = hi[j];
        end else begin
          hl[j*m + c - m] = lo[j];
          hh[j*m + c - m] = pm(KS2, hi[j]);
        end
      end
    end
  endfunction

endpackage
