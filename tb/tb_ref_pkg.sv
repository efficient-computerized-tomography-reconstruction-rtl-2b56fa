// tb_ref_pkg: reference arithmetic for the testbenches.
//
// A direct DFT in floating point (used by the FFT core model and by the
// references), and fixed-point reference models of the filtration and of
// one back-projected pixel, written from the formats of the data path:
//   filtered sample  = sat16(round(IDFT(sat16(round(DFT(P) * coef / 2^9))) / 2^(log2 N - 4)))
//   back-projection  = sat16(P(a) + round(f * (P(a+1) - P(a)) / 2^14)),
//                      T = x*cos + y*sin, a = floor(T / 2^14) + offset, f = T mod 2^14
//   accumulation     = sat16(sum + (imn >> 4))
package tb_ref_pkg;

  function automatic longint sat_w(input longint v, input int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -(64'sd1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint rnd_div(input longint v, input longint d);
    // round half up of v/d, d > 0
    longint q = v / d;
    longint r = v % d;
    if (r < 0) begin q = q - 1; r = r + d; end
    if (2 * r >= d) q = q + 1;
    return q;
  endfunction

  // Unscaled DFT (inv: e^{+j}), outputs rounded to integers and saturated.
  function automatic void dft(input int n, input bit inv, input int out_w,
                              input longint xr[], input longint xi[],
                              output longint yr[], output longint yi[]);
    real c[], s[], ar, ai, sg;
    c = new[n]; s = new[n]; yr = new[n]; yi = new[n];
    sg = inv ? 1.0 : -1.0;
    for (int k = 0; k < n; k++) begin
      c[k] = $cos(2.0 * 3.14159265358979323846 * k / n);
      s[k] = sg * $sin(2.0 * 3.14159265358979323846 * k / n);
    end
    for (int k = 0; k < n; k++) begin
      ar = 0.0; ai = 0.0;
      for (int m = 0; m < n; m++) begin
        int i = (m * k) % n;
        ar += xr[m] * c[i] - xi[m] * s[i];
        ai += xr[m] * s[i] + xi[m] * c[i];
      end
      yr[k] = sat_w(longint'(ar), out_w);
      yi[k] = sat_w(longint'(ai), out_w);
    end
  endfunction

  function automatic int clog2i(input int n);
    int r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  function automatic int ramp_coef(input int n, input int k);
    int d = (k < n - k) ? k : n - k;
    real v = 512.0 * d / (n / 2);
    int q = int'($floor(v + 0.5));
    return (q > 511) ? 511 : q;
  endfunction

  function automatic void filter_ref(input int n, input longint p[], output longint pf[]);
    longint zr[], xr[], xi[], mr[], mi[], yr[], yi[];
    int lg = clog2i(n);
    zr = new[n];
    foreach (zr[i]) zr[i] = 0;
    dft(n, 1'b0, 16 + lg + 1, p, zr, xr, xi);
    mr = new[n]; mi = new[n];
    for (int k = 0; k < n; k++) begin
      mr[k] = sat_w(rnd_div(xr[k] * ramp_coef(n, k), 512), 16);
      mi[k] = sat_w(rnd_div(xi[k] * ramp_coef(n, k), 512), 16);
    end
    dft(n, 1'b1, 16 + lg + 1, mr, mi, yr, yi);
    pf = new[n];
    for (int k = 0; k < n; k++)
      pf[k] = sat_w((lg > 4) ? rnd_div(yr[k], 64'sd1 <<< (lg - 4)) : yr[k], 16);
  endfunction

  function automatic int trig_q14(input int k, input int nproj, input bit want_sin);
    real th = 3.14159265358979323846 * k / nproj;
    return int'($floor((want_sin ? $sin(th) : $cos(th)) * 16384.0 + 0.5));
  endfunction

  // One back-projected pixel, (1,4,11), for coordinates (x, y).
  function automatic longint bp_pixel(input int x, input int y, input int c, input int s,
                                      input int offset, input int n, const ref longint pf[]);
    longint t = longint'(x) * c + longint'(y) * s;
    longint a = t >>> 14;
    longint f = t - (a <<< 14);
    int i0 = int'((a + offset) & (n - 1));
    int i1 = (i0 + 1) & (n - 1);
    longint d = pf[i1] - pf[i0];
    return sat_w(pf[i0] + rnd_div(d * f, 16384), 16);
  endfunction

endpackage
