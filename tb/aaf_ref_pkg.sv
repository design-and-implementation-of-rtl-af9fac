// aaf_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//   ref_sine(a, aw)   offset-binary sine table word: 512 + floor(511 sin(2 pi a/2^aw))
//   ref_coef(m, n)    FIR tap m of the order-n Hamming-windowed low-pass,
//                     Fc = 3400 Hz, Fs = 50 kHz, scaled by 2^11, rounded
//   ref_lfsr_step(s)  one left shift of the 40-bit noise register
//   ref_scale(s)      divide by 2^11 (floor) and clip to signed 10 bits
//   dft_amp(...)      amplitude of one frequency in a block of samples
package aaf_ref_pkg;

  localparam real TWO_PI = 6.283185307179586;

  function automatic int ref_sine(longint a, int aw);
    real ph;
    ph = TWO_PI * real'(a) / (2.0 ** aw);
    return 512 + int'($floor(511.0 * $sin(ph)));
  endfunction

  // sinc form: h = 2 fc sinc(2 fc k), normalised frequency fc = Fc/Fs
  function automatic int ref_coef(int m, int n);
    real fcn, k, x, h, w, v;
    fcn = 3400.0 / 50000.0;
    k   = real'(2 * m - n) / 2.0;
    x   = TWO_PI * fcn * k;
    h   = (k == 0.0) ? 2.0 * fcn : 2.0 * fcn * $sin(x) / x;
    w   = 0.54 - 0.46 * $cos(TWO_PI * real'(m) / real'(n));
    v   = h * w * 2048.0;
    return int'($floor(v + 0.5));
  endfunction

  function automatic logic [39:0] ref_lfsr_step(logic [39:0] s);
    return {s[38:0], ~(s[39] ^ s[2])};
  endfunction

  function automatic int ref_scale(longint s);
    longint q;
    q = s >>> 11;
    if (q > 511)  q = 511;
    if (q < -512) q = -512;
    return int'(q);
  endfunction

  // amplitude of the component at f_over_fs cycles/sample in v[0..n-1]
  function automatic real dft_amp(input real v[$], input int first, input int n, input real f_over_fs);
    real re, im;
    re = 0.0; im = 0.0;
    for (int i = 0; i < n; i++) begin
      re += v[first+i] * $cos(TWO_PI * f_over_fs * real'(i));
      im += v[first+i] * $sin(TWO_PI * f_over_fs * real'(i));
    end
    return 2.0 * $sqrt(re*re + im*im) / real'(n);
  endfunction

endpackage
