// pw_ref_pkg: sample-domain reference model of the peak-windowing chain for
// the testbenches. It is written from the algorithm, not from the RTL: exact
// integer square root, integer division for Th/e, a 7-sample minimum test,
// the feedback recursion p(n) = max(0, 1 - cp(n) - f(n)) and the two window
// filters as plain convolutions, then the gain multiply and the low-pass
// convolution. Fixed-point scaling is the documented one: gains and window
// data with 17 fractional bits, coefficients with 16, sums floored and
// saturated to 18 bits.
package pw_ref_pkg;
  typedef longint arr_t [];

  function automatic longint sat18(longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  function automatic longint isqrt(longint v);
    longint r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // Window w(k), 0 <= k <= n-1, in Q16: 0 Hann, 1 Hamming, 2 Blackman-Harris.
  function automatic longint win_q16(int k, int n, int wtype = 0);
    real t = 2.0 * 3.14159265358979 * k / (n - 1);
    real w;
    case (wtype)
      1:       w = 0.54 - 0.46 * $cos(t);
      2:       w = 0.35875 - 0.48829 * $cos(t) + 0.14128 * $cos(2.0 * t) - 0.01168 * $cos(3.0 * t);
      default: w = 0.5 * (1.0 - $cos(t));
    endcase
    return longint'(w * 65536.0 + 0.5);
  endfunction

  // PWFIR1 / PWFIR2 coefficients for window length n:
  //   h1(j) = w(j - (20 - floor((n+1)/2))) for 20 - floor((n+1)/2) <= j <= 19
  //   h2(j) = w(floor((n+1)/2) + j)        for 0 <= j <= floor(n/2) - 1
  function automatic void pw_coefs(int n, output longint h1 [20], output longint h2 [20],
                                   input int wtype = 0);
    int half = (n + 1) / 2;
    for (int j = 0; j < 20; j++) begin
      h1[j] = (j >= 20 - half) ? win_q16(j - (20 - half), n, wtype) : 0;
      h2[j] = (j <= n / 2 - 1) ? win_q16(half + j, n, wtype) : 0;
    end
  endfunction

  // Windowed-sinc low-pass, 40 taps, cut-off fc as a fraction of the sample
  // rate; 20 unique coefficients, Q16.
  function automatic void lpf_coefs(real fc, output longint h [20]);
    for (int i = 0; i < 20; i++) begin
      real t = i - 19.5;
      real s = 2.0 * fc * (($sin(2.0 * 3.14159265358979 * fc * t)) / (2.0 * 3.14159265358979 * fc * t));
      real w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * i / 39.0);
      h[i] = longint'(s * w * 65536.0 + ((s * w) >= 0 ? 0.5 : -0.5));
    end
  endfunction

  // Symmetric 40-tap FIR from 20 coefficients: out[k] for in[k].
  function automatic arr_t fir40(arr_t x, longint h [20]);
    arr_t y = new[x.size()];
    for (int k = 0; k < x.size(); k++) begin
      longint acc = 0;
      for (int i = 0; i < 20; i++) begin
        longint a = (k - i >= 0) ? x[k - i] : 0;
        longint b = (k - 39 + i >= 0) ? x[k - 39 + i] : 0;
        acc += h[i] * (a + b);
      end
      y[k] = sat18(acc >>> 16);
    end
    return y;
  endfunction

  // Peak windowing on one block of samples; y[m] belongs to x[m].
  // Counts: clipped samples, peaks, peaks reduced by the feedback.
  function automatic void papr(arr_t xi, arr_t xq, longint th, longint h1 [20],
                               longint h2 [20], bit byp, output arr_t yi,
                               output arr_t yq, output int nclip,
                               output int npeak, output int nfb);
    int ns = xi.size();
    longint c [] = new[ns];
    longint cp [] = new[ns];
    longint p [] = new[ns];
    yi = new[ns];
    yq = new[ns];
    nclip = 0; npeak = 0; nfb = 0;
    for (int m = 0; m < ns; m++) begin
      longint e = isqrt(xi[m] * xi[m] + xq[m] * xq[m]);
      if (e > th) begin
        c[m] = (th << 17) / e;
        nclip++;
      end else c[m] = 131072;
    end
    for (int m = 0; m < ns; m++) begin
      longint mn = 131072;
      for (int d = -3; d <= 3; d++)
        if (m + d >= 0 && m + d < ns && c[m + d] < mn) mn = c[m + d];
      cp[m] = (c[m] == mn) ? c[m] : 131072;
      if (cp[m] != 131072) npeak++;
    end
    for (int m = 0; m < ns; m++) begin
      longint acc = 0, f, d;
      for (int j = 0; j < 20; j++) if (m - 1 - j >= 0) acc += h2[j] * p[m - 1 - j];
      f = sat18(acc >>> 16);
      if (cp[m] != 131072 && f > 0) nfb++;
      d = (131072 - cp[m]) - f;
      p[m] = (d < 0) ? 0 : (d > 131071) ? 131071 : d;
    end
    for (int m = 0; m < ns; m++) begin
      longint acc = 0, u, b;
      for (int i = 0; i < 20; i++) begin
        int a = m + 19 - i, bb = m - 20 + i;
        acc += h1[i] * (((a >= 0 && a < ns) ? p[a] : 0) + ((bb >= 0 && bb < ns) ? p[bb] : 0));
      end
      u = sat18(acc >>> 16);
      b = (byp || u <= 0) ? 131072 : 131072 - u;
      yi[m] = (xi[m] * b) >>> 17;
      yq[m] = (xq[m] * b) >>> 17;
    end
  endfunction

  // Test signal: sum of random-phase tones, an OFDM-like envelope, scaled so
  // that its largest envelope sample is `peak` of full scale (the threshold
  // Th is a fraction of that scale, Th = 1.0 leaving the signal unclipped).
  function automatic void test_signal(int ns, real peak, output arr_t xi, output arr_t xq);
    real fr [12], ph [12];
    real ri [] = new[ns];
    real rq [] = new[ns];
    real mx = 0;
    xi = new[ns];
    xq = new[ns];
    for (int t = 0; t < 12; t++) begin
      fr[t] = ($urandom_range(0, 1000) - 500) / 1500.0;
      ph[t] = $urandom_range(0, 6283) / 1000.0;
    end
    for (int m = 0; m < ns; m++) begin
      ri[m] = 0;
      rq[m] = 0;
      for (int t = 0; t < 12; t++) begin
        ri[m] += $cos(2.0 * 3.14159265358979 * fr[t] * m + ph[t]);
        rq[m] += $sin(2.0 * 3.14159265358979 * fr[t] * m + ph[t]);
      end
      if (ri[m] * ri[m] + rq[m] * rq[m] > mx) mx = ri[m] * ri[m] + rq[m] * rq[m];
    end
    for (int m = 0; m < ns; m++) begin
      xi[m] = longint'(ri[m] / $sqrt(mx) * peak * 131071.0);
      xq[m] = longint'(rq[m] / $sqrt(mx) * peak * 131071.0);
    end
  endfunction

  // OFDM-like test signal: nsc subcarriers of a 2048-point grid (15 kHz
  // spacing at 30.72 MS/s; 600 for 10 MHz LTE) with random QPSK symbols,
  // scaled so that the largest envelope sample is `peak` of full scale.
  function automatic void ofdm_signal(int ns, int nsc, real peak, output arr_t xi, output arr_t xq);
    real ri [] = new[ns];
    real rq [] = new[ns];
    real ph [] = new[nsc];
    real mx = 0;
    xi = new[ns];
    xq = new[ns];
    for (int s = 0; s < nsc; s++) ph[s] = (2 * $urandom_range(0, 3) + 1) * 3.14159265358979 / 4.0;
    for (int m = 0; m < ns; m++) begin
      ri[m] = 0;
      rq[m] = 0;
      for (int s = 0; s < nsc; s++) begin
        int kf = (s < nsc / 2) ? s - nsc / 2 : s - nsc / 2 + 1;
        real a = 2.0 * 3.14159265358979 * kf * m / 2048.0 + ph[s];
        ri[m] += $cos(a);
        rq[m] += $sin(a);
      end
      if (ri[m] * ri[m] + rq[m] * rq[m] > mx) mx = ri[m] * ri[m] + rq[m] * rq[m];
    end
    for (int m = 0; m < ns; m++) begin
      xi[m] = longint'(ri[m] / $sqrt(mx) * peak * 131071.0);
      xq[m] = longint'(rq[m] / $sqrt(mx) * peak * 131071.0);
    end
  endfunction
endpackage
