// Reference model for the testbenches: direct evaluation of the 9/7
// symmetric wavelet filters on a symmetrically extended line.
//
// The filters are built from the analysis low-pass h and synthesis low-pass
// h~ with g[n] = (-1)^n h~[1-n], g~[n] = (-1)^n h[1+n], and the inverse is
// evaluated as two filters on the interleaved sequence
// w1 = a1[0], d1[1], a1[1], ...: bL[2k] = h~[2k], bL[2k+1] = g~[2k],
// bH[2k] = h~[2k+1], bH[2k+1] = g~[2k+1].  Coefficients are rounded to
// Q2.14, each sum is exact, and results are rounded to the 16-bit Q12.4 data
// word with saturation.  Nothing here is taken from the design's tables.
package dwt_ref_pkg;

  function automatic real hr(int k);
    real t [5] = '{0.6029490182363579, 0.2668641184428723, -0.07822326652898785,
                   -0.01686411844287495, 0.02674875741080976};
    if (k < 0) k = -k;
    return (k > 4) ? 0.0 : t[k];
  endfunction
  function automatic real htr(int k);
    real t [4] = '{1.115087052456994, 0.5912717631142470, -0.05754352622849957,
                   -0.09127176311424948};
    if (k < 0) k = -k;
    return (k > 3) ? 0.0 : t[k];
  endfunction
  function automatic real sgn(int k); return (k % 2 == 0) ? 1.0 : -1.0; endfunction
  function automatic real g(int k);  return (k < -2 || k > 4) ? 0.0 : sgn(k) * htr(1 - k); endfunction
  function automatic real gt(int k); return (k < -5 || k > 3) ? 0.0 : sgn(k) * hr(1 + k); endfunction
  function automatic real bl(int k); return (k % 2 == 0) ? htr(k) : gt(k - 1); endfunction
  function automatic real bh(int k); return (k % 2 == 0) ? htr(k + 1) : gt(k); endfunction
  function automatic int q14(real v);
    return (v >= 0) ? int'($floor(v * 16384.0 + 0.5)) : -int'($floor(-v * 16384.0 + 0.5));
  endfunction
  // quantised f[k] of channel ch (0 low/even, 1 high/odd), md 0 forward, 1 inverse
  function automatic int fq(int md, int ch, int k);
    if (md == 0 && ch == 0) return q14(hr(k));
    if (md == 0) return q14(g(k));
    if (ch == 0) return q14(bl(k));
    return q14(bh(k));
  endfunction
  function automatic int ext(int i, int nn);
    if (i < 0) i = -i;
    if (i > nn - 1) i = 2 * (nn - 1) - i;
    return i;
  endfunction
  function automatic int rnd16(longint a);
    longint r;
    r = (a + 8192) >>> 14;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  typedef int line_t [1024];

  // One channel of one line: y[m] for m = MLO .. MLO+N/2-1, returned at the
  // position the design writes it to (see the engine's output layout).
  function automatic void line_ch(int md, int ch, int nn, const ref line_t x, ref line_t y);
    int c, hh, mlo, pos;
    int cf [11];
    longint acc;
    for (int k = -5; k <= 5; k++) cf[k + 5] = fq(md, ch, k);
    c = (md == 0) ? ch : -ch;
    hh = (md == 0) ? (ch ? 3 : 4) : (ch ? 4 : 3);
    mlo = (md == 0 && ch == 1) ? 1 : 0;
    for (int m = mlo; m < mlo + nn / 2; m++) begin
      acc = 0;
      for (int k = c - hh; k <= c + hh; k++) acc += longint'(cf[k + 5]) * x[ext(2 * m - k, nn)];
      pos = (md == 0) ? (ch ? nn / 2 + m - 1 : m) : 2 * m + ch;
      y[pos] = rnd16(acc);
    end
  endfunction

  // whole line, both channels
  function automatic void line_xform(int md, int nn, const ref line_t x, ref line_t y);
    line_ch(md, 0, nn, x, y);
    line_ch(md, 1, nn, x, y);
  endfunction

  // inverse input order: sample k of w1 is at this position of a line
  function automatic int w1_pos(int k, int nn);
    return (k % 2 == 0) ? k / 2 : nn / 2 + (k - 1) / 2;
  endfunction

endpackage
