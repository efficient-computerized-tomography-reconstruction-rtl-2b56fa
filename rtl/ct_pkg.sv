// ct_pkg: shared fixed-point formats, sizes and constant functions of the
// filtered back-projection (FBP) reconstructor.
//
// Formats are written (sign, integer, fraction):
//   projection sample P ........ (1,8,7)  16 bit
//   filtered projection Pf ..... (1,4,11) 16 bit
//   cos / sin of the angle ..... (1,1,14) 16 bit
//   T = X cos + Y sin .......... (1,10,14) 25 bit, split into tint (11) / tfr (14)
//   accumulated image .......... (1,8,7)  16 bit
//   filter coefficient ......... (0,0,9)  9 bit unsigned
// These follow the 16-bit data path of the design. The cos/sin tables and the
// filter coefficients are computed here by constant functions, so no data
// file is needed; the formulas are given with each function.
package ct_pkg;

  localparam int P_W    = 16;  // projection sample, (1,8,7)
  localparam int PF_W   = 16;  // filtered projection, (1,4,11)
  localparam int TRIG_W = 16;  // cos/sin, (1,1,14)
  localparam int TRIG_F = 14;  // fraction bits of cos/sin and of T
  localparam int T_W    = 25;  // T, (1,10,14)
  localparam int TINT_W = 11;  // integer part of T
  localparam int TFR_W  = 14;  // fraction part of T
  localparam int ACC_W  = 16;  // accumulated image, (1,8,7)
  localparam int COEF_W = 9;   // filter coefficient, (0,0,9)
  localparam int XY_W   = 10;  // signed pixel coordinate (-256..255)
  localparam int NPROJ_MAX = 1024;  // largest table the functions build
  localparam int NSAMP_MAX = 1024;

  // Projection angles: theta_k = k * pi / NPROJ, k = 0..NPROJ-1 (parallel beam
  // over 180 degrees). Each entry is evaluated on its own in Q30 integer
  // arithmetic: the angle is folded into [0, pi/2] (cos(pi - a) = -cos a,
  // sin(pi - a) = sin a) and cos/sin of it are summed as Taylor series.
  // Each entry is round(2^14 * cos) (respectively sin), packed 16 bits per
  // angle, entry k at bits [16k +: 16].
  function automatic logic [NPROJ_MAX*TRIG_W-1:0] trig_table(input int nproj, input bit want_sin);
    longint one, pi_q, a, a2, term, c, s, v;
    bit mirror;
    logic [NPROJ_MAX*TRIG_W-1:0] tab;
    tab  = '0;
    one  = 64'sd1 <<< 30;
    pi_q = 64'sd3373259426;            // pi * 2^30
    for (int k = 0; k < nproj; k++) begin
      mirror = (2 * k > nproj);
      a  = (pi_q * longint'(mirror ? nproj - k : k)) / longint'(nproj);
      a2 = (a * a) >>> 30;
      // sin a = a - a^3/3! + a^5/5! - ..., cos a = 1 - a^2/2! + a^4/4! - ...
      s = 0; term = a;
      for (int i = 1; i < 24; i += 2) begin
        s    = s + term;
        term = -(((term * a2) >>> 30) / longint'((i + 1) * (i + 2)));
      end
      c = 0; term = one;
      for (int i = 0; i < 24; i += 2) begin
        c    = c + term;
        term = -(((term * a2) >>> 30) / longint'((i + 1) * (i + 2)));
      end
      if (mirror) c = -c;
      v = want_sin ? s : c;
      v = (v + (64'sd1 <<< 15)) >>> 16;   // Q30 -> Q14, rounded
      tab[k*TRIG_W +: TRIG_W] = TRIG_W'(v);
    end
    return tab;
  endfunction

  // Ram-Lak ramp filter |w| (rectangular window) in (0,0,9):
  // coef[k] = min(511, round(512 * d / (N/2))), d = min(k, N-k),
  // for FFT bin k of an N-point transform.
  function automatic logic [NSAMP_MAX*COEF_W-1:0] ramp_table(input int n);
    logic [NSAMP_MAX*COEF_W-1:0] tab;
    int d, v;
    tab = '0;
    for (int k = 0; k < n; k++) begin
      d = (k < n - k) ? k : n - k;
      v = (2048 * d / n + 1) / 2;     // round(512*d/(n/2)) = round(1024 d / n)
      if (v > 511) v = 511;
      tab[k*COEF_W +: COEF_W] = COEF_W'(v);
    end
    return tab;
  endfunction

  // Saturate a signed value to w bits (w <= 63).
  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Arithmetic right shift by sh >= 0 with round-half-up.
  function automatic longint shr_round(input longint v, input int sh);
    if (sh <= 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

endpackage
