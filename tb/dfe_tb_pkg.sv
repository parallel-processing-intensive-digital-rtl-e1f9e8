// dfe_tb_pkg: reference helpers shared by the channelizer testbenches.
//
// hb_coefs() designs a halfband lowpass prototype g(n), n = 0..N, by the
// windowed-sinc method, g(n) = 0.5 * sinc((n - N/2) / 2) * w(n) with a
// Blackman window w(n), normalised to unit DC gain. Every tap at an even
// distance from the centre is zero, the centre is 1/2. The quarter-rate shift
// that makes it analytical turns the remaining taps into
// c(k) = (-1)^k * g(2k), k = 0..N/2, which are returned quantised to Q1.15.
// Only the first (N/2+1)/2 of them are loaded into the hardware; the rest
// follow from c(N/2 - k) = -c(k).
//
// hb_kaiser() does the same with a Kaiser window whose beta follows the
// usual rule for a stopband attenuation as_db, for a prototype of order
// n_design <= n_hw, 2 + 4k. The shorter design is centred inside the n_hw
// taps (shifted by (n_hw - n_design)/2 samples, an even number), so it runs
// on hardware built for order n_hw with the outer coefficients zero.
//
// ref_round() is an independent statement of the output rounding: round half
// up after dividing by 2^13, then clamp to 16 signed bits.
package dfe_tb_pkg;

  function automatic void hb_coefs(input int n_order, output longint c [64]);
    real g [200];
    real pi = 3.14159265358979323846;
    real sum_even = 0.0;
    int  m = n_order / 2;
    for (int n = 0; n <= n_order; n++) begin
      real t = real'(n - m) / 2.0;
      real s = (n == m) ? 1.0 : $sin(pi * t) / (pi * t);
      real w = 0.42 - 0.5 * $cos(2.0 * pi * n / n_order) + 0.08 * $cos(4.0 * pi * n / n_order);
      g[n] = 0.5 * s * w;
    end
    for (int k = 0; k <= m; k++) sum_even += g[2*k];
    for (int k = 0; k < 64; k++) c[k] = 0;
    for (int k = 0; k <= m; k++) begin
      real v = g[2*k] * 0.5 / sum_even;   // taps of H sum to 1/2
      if (k % 2 == 1) v = -v;
      c[k] = longint'($rtoi(v * 32768.0 + (v >= 0 ? 0.5 : -0.5)));
    end
  endfunction

  function automatic real bessel_i0(input real x);
    real term = 1.0, sum = 1.0;
    for (int k = 1; k < 40; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      sum += term;
    end
    return sum;
  endfunction

  function automatic void hb_kaiser(input int n_design, input real as_db, input int n_hw,
                                    output longint c [64]);
    real g [200];
    real pi = 3.14159265358979323846;
    real sum_even = 0.0;
    real beta;
    int  m = n_design / 2;
    int  sh = (n_hw - n_design) / 2;
    beta = (as_db > 50.0) ? 0.1102 * (as_db - 8.7)
         : 0.5842 * $pow(as_db - 21.0, 0.4) + 0.07886 * (as_db - 21.0);
    for (int n = 0; n <= n_hw; n++) g[n] = 0.0;
    for (int n = 0; n <= n_design; n++) begin
      real t, s, r, w;
      t = real'(n - m) / 2.0;
      s = (n == m) ? 1.0 : $sin(pi * t) / (pi * t);
      r = 2.0 * real'(n - m) / real'(n_design);
      w = bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
      g[n + sh] = 0.5 * s * w;
    end
    for (int k = 0; k <= n_hw / 2; k++) sum_even += g[2*k];
    for (int k = 0; k < 64; k++) c[k] = 0;
    for (int k = 0; k <= n_hw / 2; k++) begin
      real v;
      v = g[2*k] * 0.5 / sum_even;
      if (k % 2 == 1) v = -v;
      c[k] = longint'($rtoi(v * 32768.0 + (v >= 0 ? 0.5 : -0.5)));
    end
  endfunction

  function automatic longint ref_round(input longint v);
    longint r = (v + 4096) >>> 13;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

endpackage
