// fft_ref_pkg: reference models for the testbenches.
//
// ref_fft computes, bit for bit, what the engine must produce: an in-place
// radix-2 DIT transform over data stored in bit-reversed order, visiting the
// butterflies in plain stage/index order (the order inside a stage does not
// change the result), with the same fixed-point butterfly (product truncated
// to the data scale, sum and difference halved by an arithmetic shift,
// saturated). dft_scaled is a floating-point DFT divided by D, used to check
// that the fixed-point result is a Fourier transform at all.
package fft_ref_pkg;

  function automatic int unsigned bitrev(int unsigned x, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < bits; b++) r |= ((x >> b) & 1) << (bits - 1 - b);
    return r;
  endfunction

  function automatic int unsigned log2i(int unsigned x);
    int unsigned r;
    r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  function automatic int tw_re(int unsigned k, int unsigned d, int unsigned tw);
    real a;
    a = 2.0 * 3.14159265358979323846 * k / d;
    return $rtoi($floor($cos(a) * (2.0 ** (tw - 2)) + 0.5));
  endfunction

  function automatic int tw_im(int unsigned k, int unsigned d, int unsigned tw);
    real a;
    a = 2.0 * 3.14159265358979323846 * k / d;
    return $rtoi($floor(-$sin(a) * (2.0 ** (tw - 2)) + 0.5));
  endfunction

  function automatic int sat(longint v, int unsigned w);
    longint hi, lo;
    hi = (longint'(1) << (w - 1)) - 1;
    lo = -(longint'(1) << (w - 1));
    if (v > hi) return int'(hi);
    if (v < lo) return int'(lo);
    return int'(v);
  endfunction

  // One butterfly, returns {xr, xi, yr, yi} through refs.
  function automatic void bfly(input int ar, ai, br, bi, wr, wi, input int unsigned w, tw,
                               output int xr, xi, yr, yi);
    longint pr, pi, tr, ti;
    pr = longint'(br) * wr - longint'(bi) * wi;
    pi = longint'(br) * wi + longint'(bi) * wr;
    tr = pr >>> (tw - 2);
    ti = pi >>> (tw - 2);
    xr = sat((longint'(ar) + tr) >>> 1, w);
    xi = sat((longint'(ai) + ti) >>> 1, w);
    yr = sat((longint'(ar) - tr) >>> 1, w);
    yi = sat((longint'(ai) - ti) >>> 1, w);
  endfunction

  // In-place transform of re/im (datapoint order), D = size of the arrays.
  function automatic void ref_fft(ref int re[], ref int im[], input int unsigned w, tw);
    int unsigned d, s_n, q, k;
    int xr, xi, yr, yi;
    d = re.size();
    s_n = log2i(d);
    for (int unsigned s = 0; s < s_n; s++) begin
      for (int unsigned p = 0; p < d; p++) begin
        if (((p >> s) & 1) == 0) begin
          q = p + (1 << s);
          k = (p & ((1 << s) - 1)) << (s_n - 1 - s);
          bfly(re[p], im[p], re[q], im[q], tw_re(k, d, tw), tw_im(k, d, tw), w, tw,
               xr, xi, yr, yi);
          re[p] = xr; im[p] = xi; re[q] = yr; im[q] = yi;
        end
      end
    end
  endfunction

  // Floating-point DFT bin k of x (natural order), divided by D.
  function automatic void dft_scaled(ref int xr[], ref int xi[], input int unsigned k,
                                     output real yr, output real yi);
    int unsigned d;
    real a;
    d = xr.size();
    yr = 0.0; yi = 0.0;
    for (int unsigned n = 0; n < d; n++) begin
      a = -2.0 * 3.14159265358979323846 * ((n * k) % d) / d;
      yr += xr[n] * $cos(a) - xi[n] * $sin(a);
      yi += xr[n] * $sin(a) + xi[n] * $cos(a);
    end
    yr = yr / d; yi = yi / d;
  endfunction

  // One radix-3 butterfly with twiddles w1, w2 on inputs 1 and 2, scaled by
  // 1/4, bit for bit as the hardware computes it (see butterfly_r3).
  function automatic void bfly3(input int a0r, a0i, a1r, a1i, a2r, a2i,
                                input int w1r, w1i, w2r, w2i, input int unsigned w, tw,
                                output int y0r, y0i, y1r, y1i, y2r, y2i);
    longint k, u1r, u1i, u2r, u2i, sr, si, dr, di, qr, qi, cr, ci;
    k   = longint'($rtoi($floor($sqrt(3.0) * (2.0 ** (tw - 2)) + 0.5)));
    u1r = (longint'(a1r) * w1r - longint'(a1i) * w1i) >>> (tw - 2);
    u1i = (longint'(a1r) * w1i + longint'(a1i) * w1r) >>> (tw - 2);
    u2r = (longint'(a2r) * w2r - longint'(a2i) * w2i) >>> (tw - 2);
    u2i = (longint'(a2r) * w2i + longint'(a2i) * w2r) >>> (tw - 2);
    sr = u1r + u2r; si = u1i + u2i;
    dr = u1r - u2r; di = u1i - u2i;
    qr = (dr * k) >>> (tw - 2);
    qi = (di * k) >>> (tw - 2);
    cr = 2 * longint'(a0r) - sr;
    ci = 2 * longint'(a0i) - si;
    y0r = sat((2 * (longint'(a0r) + sr)) >>> 3, w);
    y0i = sat((2 * (longint'(a0i) + si)) >>> 3, w);
    y1r = sat((cr + qi) >>> 3, w);
    y1i = sat((ci - qr) >>> 3, w);
    y2r = sat((cr - qi) >>> 3, w);
    y2i = sat((ci + qr) >>> 3, w);
  endfunction

endpackage
