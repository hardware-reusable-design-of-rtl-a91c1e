// mfcc_ref_pkg: reference models for the testbenches of the MFCC front end.
//
// Written independently of the RTL from the arithmetic the design specifies:
// plain loops over integers and reals, no pipelining. Used by the block
// testbenches and by the end-to-end test to predict outputs bit-exactly
// (or, for the FFT against a floating-point DFT, within a tolerance).
package mfcc_ref_pkg;

  localparam real RPI = 3.14159265358979323846;

  function automatic int rnd(real x);
    if (x >= 0.0) return int'($floor(x + 0.5));
    return -int'($floor(-x + 0.5));
  endfunction

  function automatic int sat(longint v, int bits);
    longint hi = (longint'(1) << (bits - 1)) - 1;
    longint lo = -(longint'(1) << (bits - 1));
    if (v > hi) return int'(hi);
    if (v < lo) return int'(lo);
    return int'(v);
  endfunction

  // y[n] = s[n] - s[n-1] + floor(s[n-1] / 32), saturated to 16 bits
  function automatic int preemph_ref(int s, int s_prev);
    int q = s_prev >>> 5;
    return sat(longint'(s) - s_prev + q, 16);
  endfunction

  function automatic int rev_bits(int v, int bits);
    int r = 0;
    for (int b = bits - 1; b >= 0; b--) if (v[bits - 1 - b]) r += (1 << b);
    return r;
  endfunction

  function automatic int ham_ref(int n, int N);
    return rnd(1024.0 * (0.54 - 0.46 * $cos(2.0 * RPI * real'(n) / real'(N - 1))));
  endfunction

  function automatic int window_ref(int s, int n, int N);
    return int'((longint'(s) * ham_ref(n, N)) >>> 10);
  endfunction

  // Bit-exact model of the fixed-point radix-2 DIT FFT: input x in natural
  // order, twiddles round(2^14 * exp(-j 2 pi k / N)), products rounded.
  function automatic void fft_ref(input int N, input longint x [],
                                  output longint re [], output longint im []);
    int L = $clog2(N);
    re = new[N];
    im = new[N];
    for (int i = 0; i < N; i++) begin
      re[rev_bits(i, L)] = x[i];
      im[rev_bits(i, L)] = 0;
    end
    for (int m = 2; m <= N; m *= 2) begin
      for (int j = 0; j < m / 2; j++) begin
        longint wr = rnd(16384.0 * $cos(2.0 * RPI * real'(j * (N / m)) / real'(N)));
        longint wi = -rnd(16384.0 * $sin(2.0 * RPI * real'(j * (N / m)) / real'(N)));
        for (int g = 0; g < N; g += m) begin
          int a = g + j, b = g + j + m / 2;
          longint tr = (re[b] * wr - im[b] * wi + 8192) >>> 14;
          longint ti = (re[b] * wi + im[b] * wr + 8192) >>> 14;
          longint ar = re[a], ai = im[a];
          re[a] = ar + tr; im[a] = ai + ti;
          re[b] = ar - tr; im[b] = ai - ti;
        end
      end
    end
  endfunction

  // Band edges: bins nearest to NB+1 mel-spaced frequencies from f_lo to fs/2.
  function automatic int edge_ref(int e, int NB, int N, real fs, real f_lo);
    real ml = 2595.0 * $log10(1.0 + f_lo / 700.0);
    real mh = 2595.0 * $log10(1.0 + fs / 1400.0);
    real m  = ml + (mh - ml) * real'(e) / real'(NB);
    real f  = 700.0 * ($pow(10.0, m / 2595.0) - 1.0);
    return rnd(f * real'(N) / fs);
  endfunction

  function automatic longint sat_u32(longint v);
    return (v > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : v;
  endfunction

  // |X|^2 after the shift right by `shift` and saturation to 16 bits
  function automatic longint power_ref(longint re, longint im, int shift);
    longint r = sat(re >>> shift, 16);
    longint i = sat(im >>> shift, 16);
    return r * r + i * i;
  endfunction

  // Mitchell log2 with 10 fraction bits
  function automatic int log2m_ref(longint z);
    int c = 0;
    if (z <= 0) return 0;
    while ((z >> (c + 1)) != 0) c++;
    return (c << 10) + int'(((z - (longint'(1) << c)) << 10) >> c);
  endfunction

  // ln = (log2 * 11357) >> 14 + 8617, 16-bit result
  function automatic int ln_ref(longint z);
    longint p = (longint'(log2m_ref(z)) * 11357) >>> 14;
    return int'(shortint'(p + 8617));
  endfunction

  function automatic int dct_ref(int i, int j, int NB);
    return rnd(1024.0 * $cos(RPI * real'(i) * (real'(j) + 0.5) / real'(NB)));
  endfunction

  // Triangular mel filter bank: NB+2 edges; band b rises over bins
  // [edge b, edge b+1) with weight (k - edge b)/(edge b+1 - edge b) in 10
  // fraction bits, then takes the complement over [edge b+1, edge b+2).
  // Sums saturate in bin order, rising part first.
  function automatic void tri_bands_ref(input int N, input int NB, input real fs,
                                        input longint p [], output longint band []);
    band = new[NB];
    for (int b = 0; b < NB; b++) begin
      int e0, e1, e2;
      longint acc;
      e0 = edge_ref(b, NB + 1, N, fs, 64.0);
      e1 = edge_ref(b + 1, NB + 1, N, fs, 64.0);
      e2 = edge_ref(b + 2, NB + 1, N, fs, 64.0);
      acc = 0;
      for (int k = e0; k < e1; k++)
        acc = sat_u32(acc + ((p[k] * rnd(1024.0 * real'(k - e0) / real'(e1 - e0))) >> 10));
      for (int k = e1; k < e2; k++)
        acc = sat_u32(acc + p[k] - ((p[k] * rnd(1024.0 * real'(k - e1) / real'(e2 - e1))) >> 10));
      band[b] = acc;
    end
  endfunction

  // Features of one frame from its FFT bins 0..N/2: log frame energy and
  // NC cepstral coefficients from NB mel bands (from 64 Hz to fs/2), either
  // plain sums of bins between band limits or triangular filters.
  function automatic void feat_from_bins(input int N, input int NB, input int NC,
                                         input longint re [], input longint im [],
                                         output int log_e, output longint cep [],
                                         input real fs = 8000.0, input bit triang = 1'b0);
    int shift = $clog2(N);
    int lo = edge_ref(0, NB, N, fs, 64.0);
    longint facc = 0;
    longint band_ln [], p [], tb [];
    band_ln = new[NB];
    p = new[N / 2 + 1];
    cep = new[NC];
    for (int k = 0; k <= N / 2; k++) begin
      p[k] = power_ref(re[k], im[k], shift);
      facc = sat_u32(facc + p[k]);
    end
    log_e = ln_ref(facc);
    if (triang) tri_bands_ref(N, NB, fs, p, tb);
    for (int b = 0; b < NB; b++) begin
      int first, last;
      longint bacc;
      first = (b == 0) ? lo : edge_ref(b, NB, N, fs, 64.0) + 1;
      last  = edge_ref(b + 1, NB, N, fs, 64.0);
      bacc = 0;
      for (int k = first; k <= last; k++) bacc = sat_u32(bacc + p[k]);
      band_ln[b] = ln_ref(triang ? tb[b] : bacc);
    end
    for (int i = 0; i < NC; i++) begin
      longint acc = 0;
      for (int b = 0; b < NB; b++) acc += band_ln[b] * dct_ref(i, b, NB);
      cep[i] = acc >>> 10;
    end
  endfunction

  // Features of one frame of N pre-emphasised samples (oldest first).
  function automatic void feat_from_frame(input int N, input int NB, input int NC,
                                          input longint pe [],
                                          output int log_e, output longint cep [],
                                          input real fs = 8000.0, input bit triang = 1'b0);
    longint x [], re [], im [];
    x = new[N];
    for (int n = 0; n < N; n++) x[n] = window_ref(int'(pe[n]), n, N);
    fft_ref(N, x, re, im);
    feat_from_bins(N, NB, NC, re, im, log_e, cep, fs, triang);
  endfunction

endpackage
