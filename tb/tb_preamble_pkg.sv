// tb_preamble_pkg: test stimulus for the auto-correlator and the top level.
//
// A Preamble object builds the received legacy preamble on NR antennas:
// PRE_IDLE samples of noise, ten repetitions of a random 16-sample short
// training symbol, a 32-sample guard interval (the last 32 samples of the
// long symbol), two random 64-sample long training symbols and PRE_TAIL
// samples of noise. Each antenna sees the same transmitted waveform through
// its own random complex gain, rotated by the carrier frequency offset
// exp(j*2*pi*eps*n/N), plus uniform noise, rounded and clipped to 10-bit I/Q.
// ref_corr() computes the sample-reduced, time-multiplexed correlation
// directly from the stored samples: antenna j (0-based) contributes the
// products for positions j*L/NR .. (j+1)*L/NR-1 of the second symbol against
// the first.
package tb_preamble_pkg;
  import ac_pkg::*;

  localparam real PI       = 3.14159265358979;
  localparam int  PRE_IDLE = 24;
  localparam int  PRE_TAIL = 24;
  localparam int  STS8     = PRE_IDLE + 7 * STS_LEN;             // first sample of the 8th STS
  localparam int  LTS1     = PRE_IDLE + 10 * STS_LEN + 32;       // first sample of LTS 1
  localparam int  PRE_LEN  = LTS1 + 2 * LTS_LEN + PRE_TAIL;

  class Preamble;
    iq_t s [NR][PRE_LEN];
    real eps;

    function automatic int q(real v);
      int r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
      if (r > 511)  r = 511;
      if (r < -512) r = -512;
      return r;
    endfunction

    function automatic real urand(real lo, real hi);
      return lo + (hi - lo) * ($urandom_range(0, 1000000) / 1000000.0);
    endfunction

    // amp: peak amplitude of the training symbols; noise: peak noise amplitude.
    function void build(real cfo, real amp, real noise);
      real sts_re [STS_LEN], sts_im [STS_LEN], lts_re [LTS_LEN], lts_im [LTS_LEN];
      real g_re [NR], g_im [NR];
      eps = cfo;
      for (int k = 0; k < STS_LEN; k++) begin sts_re[k] = urand(-1, 1); sts_im[k] = urand(-1, 1); end
      for (int k = 0; k < LTS_LEN; k++) begin lts_re[k] = urand(-1, 1); lts_im[k] = urand(-1, 1); end
      for (int j = 0; j < NR; j++) begin
        real a = urand(0.5, 1.0), ph = urand(-PI, PI);
        g_re[j] = a * $cos(ph);
        g_im[j] = a * $sin(ph);
      end
      for (int n = 0; n < PRE_LEN; n++) begin
        real x_re = 0.0, x_im = 0.0, rot = 2.0 * PI * cfo * n / FFT_N;
        if (n >= PRE_IDLE && n < PRE_IDLE + 10 * STS_LEN) begin
          x_re = sts_re[(n - PRE_IDLE) % STS_LEN];
          x_im = sts_im[(n - PRE_IDLE) % STS_LEN];
        end else if (n >= PRE_IDLE + 10 * STS_LEN && n < LTS1 + 2 * LTS_LEN) begin
          int k = (n - LTS1 + 2 * LTS_LEN) % LTS_LEN;   // GI2 is the tail of LTS
          x_re = lts_re[k];
          x_im = lts_im[k];
        end
        for (int j = 0; j < NR; j++) begin
          real y_re = g_re[j] * x_re - g_im[j] * x_im;
          real y_im = g_re[j] * x_im + g_im[j] * x_re;
          real z_re = y_re * $cos(rot) - y_im * $sin(rot);
          real z_im = y_re * $sin(rot) + y_im * $cos(rot);
          s[j][n].re = IQ_W'(q(amp * z_re + urand(-noise, noise)));
          s[j][n].im = IQ_W'(q(amp * z_im + urand(-noise, noise)));
        end
      end
    endfunction

    // Reference correlation: first symbol at n0, symbol length L.
    function void ref_corr(int n0, int L, output longint re, output longint im);
      re = 0;
      im = 0;
      for (int j = 0; j < NR; j++)
        for (int k = j * (L / NR); k < (j + 1) * (L / NR); k++) begin
          iq_t a = s[j][n0 + L + k], b = s[j][n0 + k];
          re += longint'(a.re) * b.re + longint'(a.im) * b.im;
          im += longint'(a.im) * b.re - longint'(a.re) * b.im;
        end
    endfunction
  endclass

endpackage
