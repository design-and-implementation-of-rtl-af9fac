// aaf_pkg: constants and elaboration-time table functions shared by the
// anti-aliasing filter test system.
//
// The frequency codes follow L = 2^32 * F / F_ref for a 32-bit phase
// accumulator: the signal and interference synthesizers run from the 50 kHz
// sample pulse, the sample-pulse synthesizer from the 50 MHz clock.
//
// Two tables are computed here rather than stored in files:
//   sine_sample(a)  one period of a 10-bit offset-binary sine,
//                   X(a) = 512 + floor(511 * sin(2*pi*a / 2^AW)).
//                   Address a holds the sample of phase a; the sample of
//                   phase 0 (and 2^AW) is the mid-scale value 512.
//   fir_coef(m,...) tap m of a Hamming-windowed ideal low-pass filter of
//                   order N (N+1 taps), n = m - N/2:
//                     h(0) = 2*Fc/Fs,  h(n) = sin(2*pi*n*Fc/Fs) / (pi*n),
//                     w(m) = 0.54 - 0.46*cos(2*pi*m/N),
//                   quantised to a signed CW-bit integer round(h*w*2^QSHIFT).
//                   With QSHIFT = 11 the largest tap is 279 and the taps sum
//                   to 2047, so a right shift by 11 restores unity DC gain.
// Both are constant functions: they are evaluated when the design is
// elaborated and become ROM contents or constant multiplier operands.
package aaf_pkg;

  localparam int unsigned PA_W      = 32;          // phase accumulator width
  localparam int unsigned ROM_AW    = 14;          // 2^14 = 16384 words
  localparam int unsigned SMP_W     = 10;          // sample / DAC word
  localparam int unsigned COEF_W    = 10;          // FIR coefficient word
  localparam int unsigned SUM_W     = 30;          // FIR adder output
  localparam int unsigned FIR_QSHIFT = 11;         // coefficient scale 2^11

  localparam logic [PA_W-1:0] L_SIG_2000HZ  = 32'd171798692;
  localparam logic [PA_W-1:0] L_SIN1_3500HZ = 32'd300647711;
  localparam logic [PA_W-1:0] L_SIN2_3900HZ = 32'd335007449;
  localparam logic [PA_W-1:0] L_SAM_50KHZ   = 32'd4294967;

  localparam real PI = 3.14159265358979323846;

  // Offset-binary sine sample for phase address a of a 2^aw-word table.
  function automatic logic [SMP_W-1:0] sine_sample(int unsigned a, int unsigned aw);
    real s;
    s = 511.0 * $sin(2.0 * PI * real'(a) / real'(64'd1 << aw));
    return SMP_W'(512 + $rtoi($floor(s)));
  endfunction

  // Quantised Hamming-windowed low-pass tap m of an order-n filter.
  function automatic logic signed [COEF_W-1:0] fir_coef(int m, int n, real fc_hz,
                                                        real fs_hz, int qshift);
    real k, h, w, v;
    k = real'(m) - real'(n) / 2.0;
    if (k == 0.0) h = 2.0 * fc_hz / fs_hz;
    else          h = $sin(2.0 * PI * k * fc_hz / fs_hz) / (PI * k);
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(m) / real'(n));
    v = h * w * real'(64'd1 << qshift);
    return COEF_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

endpackage
