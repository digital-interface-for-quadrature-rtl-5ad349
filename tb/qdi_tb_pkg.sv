// qdi_tb_pkg: reference arithmetic shared by the testbenches.
//
// band_pass_coef() gives the rectangular-windowed band-pass design used for
// the interface: an ideal band-pass centred on a quarter of the sample rate
// with a pass band of one tenth of the carrier frequency (fs/40 at fs = 4f),
// truncated to ntaps taps and quantised to Q1.15:
//   h[n] = 2*(B/fs) * sinc(B*k/fs) * cos(pi*k/2),  k = n - (ntaps-1)/2.
// fir_ref() is the bit-exact FIR result: sum of x*h, rounded from Q.15 to
// nearest and saturated to 16 bits. adc_code() is the ideal 12-bit code of
// an input with full scale +/-1.0.
package qdi_tb_pkg;

  function automatic int band_pass_coef(int n, int ntaps);
    real pi, bw, k, s, h;
    pi = 3.14159265358979;
    bw = 1.0 / 40.0;                 // pass band / sample rate
    k  = real'(n) - real'(ntaps - 1) / 2.0;
    s  = (k == 0.0) ? 1.0 : $sin(pi * bw * k) / (pi * bw * k);
    h  = 2.0 * bw * s * $cos(pi * k / 2.0);
    return $rtoi(h * 32768.0 + ((h >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic int round_sat(longint acc);
    longint r;
    r = (acc + 64'sd16384) >>> 15;
    if (r > 32767)  return 32767;
    if (r < -32768) return -32768;
    return int'(r);
  endfunction

  function automatic int adc_code(real v);
    int c;
    c = $rtoi(v * 2047.0 + ((v >= 0.0) ? 0.5 : -0.5));
    if (c > 2047)  c = 2047;
    if (c < -2048) c = -2048;
    return c;
  endfunction

endpackage
