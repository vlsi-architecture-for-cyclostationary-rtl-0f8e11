// Reference models for the detector testbenches.
//
// Written as straight array algorithms, independent of the streaming RTL:
// the in-place radix-4 FFT, the autocorrelation, the statistics and the
// test statistic, using the same number format (Q15.16 parts, products
// truncated by dropping 16 fraction bits, wrapping at 32 bits). Also a
// generator for OFDM frames (QPSK on 64 subcarriers with a 16-sample cyclic
// prefix) with additive white Gaussian noise.
package cfd_ref_pkg;

  typedef logic signed [31:0]  int32_t;
  typedef logic signed [63:0]  int64_t;
  typedef logic signed [127:0] int128_t;

  // Complex sample as {re, im}.
  function automatic int32_t re_of(logic [63:0] v); return int32_t'(v[63:32]); endfunction
  function automatic int32_t im_of(logic [63:0] v); return int32_t'(v[31:0]);  endfunction
  function automatic logic [63:0] mk(int32_t re, int32_t im); return {re, im}; endfunction

  function automatic int32_t qmul(int32_t a, int32_t b);
    int64_t p;
    p = int64_t'(a) * int64_t'(b);
    return int32_t'(p >>> 16);
  endfunction

  function automatic logic [63:0] cmul(logic [63:0] a, logic [63:0] b);
    int64_t r, i;
    r = int64_t'(re_of(a)) * int64_t'(re_of(b)) - int64_t'(im_of(a)) * int64_t'(im_of(b));
    i = int64_t'(re_of(a)) * int64_t'(im_of(b)) + int64_t'(im_of(a)) * int64_t'(re_of(b));
    return mk(int32_t'(r >>> 16), int32_t'(i >>> 16));
  endfunction

  function automatic logic [63:0] cadd(logic [63:0] a, logic [63:0] b);
    return mk(re_of(a) + re_of(b), im_of(a) + im_of(b));
  endfunction

  function automatic int32_t to_q(real v);
    real s;
    s = v * 65536.0;
    return int32_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic real from_q(int32_t v);
    return real'(v) / 65536.0;
  endfunction

  // Twiddle factor W_n^m = exp(-j 2 pi m / n) in Q15.16.
  function automatic logic [63:0] twiddle(int m, int n);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'(m) / real'(n);
    return mk(to_q($cos(ang)), to_q(-$sin(ang)));
  endfunction

  // (-j)^e times v
  function automatic logic [63:0] rot_mj(logic [63:0] v, int e);
    case (e % 4)
      0: return v;
      1: return mk(im_of(v), -re_of(v));
      2: return mk(-re_of(v), -im_of(v));
      default: return mk(-im_of(v), re_of(v));
    endcase
  endfunction

  // In-place radix-4 DIF FFT; the result is left in digit-reversed order,
  // like the hardware output stream.
  function automatic void fft_dif4(ref logic [63:0] x [], input int n);
    logic [63:0] tmp [];
    tmp = new[n];
    for (int m = n; m >= 4; m /= 4) begin
      int q;
      q = m / 4;
      for (int b = 0; b < n; b += m)
        for (int i = 0; i < q; i++)
          for (int k = 0; k < 4; k++) begin
            logic [63:0] y;
            y = 64'd0;
            for (int p = 0; p < 4; p++) y = cadd(y, rot_mj(x[b + i + p*q], p*k));
            tmp[b + k*q + i] = cmul(y, twiddle(i * k * (n / m), n));
          end
      for (int j = 0; j < n; j++) x[j] = tmp[j];
    end
  endfunction

  // Base-4 digit reversal of idx over log4(n) digits.
  function automatic int digrev4(int idx, int n);
    int r, v;
    r = 0; v = idx;
    for (int m = n; m > 1; m /= 4) begin
      r = r * 4 + (v % 4);
      v /= 4;
    end
    return r;
  endfunction

  // Mean of a*b over the bins, as the MAC block reports it (Q15.16,
  // accumulated at full precision, divided by 2^avg_shift, saturated).
  function automatic int32_t mac_ref(logic [63:0] f [], int n, int sel, int avg_shift);
    int128_t acc, s;
    acc = 0;
    for (int j = 0; j < n; j++) begin
      int32_t u, v;
      u = (sel == 1) ? im_of(f[j]) : re_of(f[j]);
      v = (sel == 0) ? re_of(f[j]) : im_of(f[j]);
      acc += int128_t'(u) * int128_t'(v);
    end
    s = acc >>> (16 + avg_shift);
    if (s > 128'sd2147483647) return 32'sh7FFF_FFFF;
    if (s < -128'sd2147483648) return 32'sh8000_0000;
    return int32_t'(s);
  endfunction

  // T = (X^2 D + Y^2 A - 2XYB) / (AD - B^2), Q47.16, rounded toward zero.
  function automatic int64_t tstat_ref(int32_t a, int32_t b, int32_t d, int32_t x, int32_t y);
    int128_t num, den, q;
    num = int128_t'(x) * x * d + int128_t'(y) * y * a - 2 * int128_t'(x) * y * b;
    den = int128_t'(a) * d - int128_t'(b) * b;
    if (den == 0) return (num < 0) ? 64'sh8000_0000_0000_0000 : 64'sh7FFF_FFFF_FFFF_FFFF;
    q = num / den;
    if (q > 128'sh7FFF_FFFF_FFFF_FFFF) return 64'sh7FFF_FFFF_FFFF_FFFF;
    if (q < -128'sh7FFF_FFFF_FFFF_FFFF) return 64'sh8000_0000_0000_0001;
    return int64_t'(q);
  endfunction

  // Standard normal sample (sum of twelve uniforms).
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) begin
      logic [31:0] u;
      u = $urandom;
      s += real'(u[23:0]) / 16777216.0;
    end
    return s - 6.0;
  endfunction

  // OFDM frame: nsym symbols of 64 QPSK subcarriers plus a 16-sample cyclic
  // prefix, unit average power, plus complex noise of power 10^(-snr_db/10);
  // signal_on = 0 gives noise only. The sum is scaled to unit average power,
  // as a gain control ahead of the converter would, so that the Q15.16 range
  // of the datapath fits at every SNR.
  function automatic void ofdm_frame(ref logic [63:0] x [], input int nsamp,
                                     input bit signal_on, input real snr_db);
    real nsd, g;
    real dr [64];
    real di [64];
    nsd = $sqrt($pow(10.0, -snr_db / 10.0) / 2.0);
    g = 1.0 / $sqrt((signal_on ? 1.0 : 0.0) + 2.0 * nsd * nsd);
    for (int n0 = 0; n0 < nsamp; n0 += 80) begin
      for (int k = 0; k < 64; k++) begin
        logic [31:0] u;
        u = $urandom;
        dr[k] = u[7] ? 0.70710678 : -0.70710678;
        di[k] = u[19] ? 0.70710678 : -0.70710678;
      end
      for (int t = 0; t < 80 && n0 + t < nsamp; t++) begin
        // positions 0..15 repeat data samples 48..63 (cyclic prefix)
        int ds;
        real ar, ai, vr, vi;
        ds = (t < 16) ? t + 48 : t - 16;
        ar = 0.0;
        ai = 0.0;
        for (int k = 0; k < 64; k++) begin
          real ang;
          ang = 2.0 * 3.14159265358979323846 * real'(k * ds) / 64.0;
          ar += dr[k] * $cos(ang) - di[k] * $sin(ang);
          ai += dr[k] * $sin(ang) + di[k] * $cos(ang);
        end
        vr = nsd * gauss();
        vi = nsd * gauss();
        if (signal_on) begin
          vr += ar / 8.0;
          vi += ai / 8.0;
        end
        x[n0 + t] = mk(to_q(g * vr), to_q(g * vi));
      end
    end
  endfunction

endpackage
