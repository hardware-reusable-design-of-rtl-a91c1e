// mfcc_pkg: constants, types and table generators shared by the MFCC
// feature-extraction front end.
//
// Fixed-point convention: samples and most intermediate results are 16-bit
// two's complement. Fractional quantities (window coefficients, cosines,
// logarithms) are scaled by 1024 (2^10), the normalisation the design uses
// everywhere in place of floating point. FFT twiddle factors use a finer
// 2^14 scale to limit the error that accumulates over the FFT stages.
//
// The table functions below are evaluated at elaboration time to fill the
// read-only memories, so that changing the frame length, the number of bands
// or the number of cepstral coefficients regenerates the tables with no
// external files.
package mfcc_pkg;

  localparam int DATA_W    = 16;   // sample and feature word width
  localparam int Q_SHIFT   = 10;   // fixed-point scale 2^10
  localparam int TW_SHIFT  = 14;   // twiddle scale 2^14
  localparam real PI       = 3.14159265358979323846;

  typedef logic signed [DATA_W-1:0] sample_t;

  // Reverse the low `bits` bits of `v`.
  function automatic int unsigned bitrev(int unsigned v, int bits);
    int unsigned r = 0;
    for (int b = 0; b < bits; b++) r = (r << 1) | ((v >> b) & 1);
    return r;
  endfunction

  // Round a real to the nearest integer (halves away from zero).
  function automatic int round_int(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  // Hamming window coefficient n of an N-point window, scaled by 2^10.
  function automatic int hamming_coef(int n, int N);
    return round_int((0.54 - 0.46 * $cos(2.0 * PI * n / (N - 1))) * (1 << Q_SHIFT));
  endfunction

  // Twiddle factor W_N^k = cos(2 pi k/N) - j sin(2 pi k/N), scaled by 2^14.
  function automatic int twiddle_re(int k, int N);
    return round_int($cos(2.0 * PI * k / N) * (1 << TW_SHIFT));
  endfunction
  function automatic int twiddle_im(int k, int N);
    return -round_int($sin(2.0 * PI * k / N) * (1 << TW_SHIFT));
  endfunction

  // DCT basis cos(pi * i * (j + 0.5) / NB), scaled by 2^10.
  function automatic int dct_coef(int i, int j, int NB);
    return round_int($cos(PI * i * (j + 0.5) / NB) * (1 << Q_SHIFT));
  endfunction

  // Mel scale and its inverse.
  function automatic real mel(real f);
    return 2595.0 * $log10(1.0 + f / 700.0);
  endfunction
  function automatic real mel_inv(real m);
    return 700.0 * ($pow(10.0, m / 2595.0) - 1.0);
  endfunction

  // FFT bin nearest to band edge e (0..NB) of NB mel-spaced bands between
  // F_LO and FS/2, for an N-point FFT at sample rate FS.
  function automatic int mel_edge_bin(int e, int NB, int N, real FS, real F_LO);
    real m_lo = mel(F_LO);
    real m_hi = mel(FS / 2.0);
    real f    = mel_inv(m_lo + (m_hi - m_lo) * e / NB);
    return round_int(f * N / FS);
  endfunction

  // Weight (Q_SHIFT fraction bits) of FFT bin k on the rising slope of the
  // triangular filter whose lower edge is at or below k: with NB+2 mel-spaced
  // edges, a bin between edges j and j+1 rises on band j with weight
  // (k - edge j) / (edge j+1 - edge j); the rest falls on band j-1.
  function automatic int tri_weight(int k, int NB, int N, real FS, real F_LO);
    int lo, hi;
    for (int j = 0; j <= NB; j++) begin
      lo = mel_edge_bin(j, NB + 1, N, FS, F_LO);
      hi = mel_edge_bin(j + 1, NB + 1, N, FS, F_LO);
      if (k >= lo && k < hi)
        return round_int(real'(k - lo) * real'(1 << Q_SHIFT) / real'(hi - lo));
    end
    return 0;
  endfunction

endpackage
