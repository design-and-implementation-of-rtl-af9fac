// fir_lpf: direct-form FIR low-pass filter, order NTAPS-1 = 1500, cut-off
// FC_HZ = 3400 Hz at the sample rate FS_HZ = 50 kHz, Hamming window.
//
// It evaluates the convolution y(n) = sum_{m=0}^{NTAPS-1} h(m) * x(n-m) in
// full once per sample: a delay line of NTAPS-1 ten-bit registers holds
// x(n-1) .. x(n-1500), the current input din is x(n), every tap has its own
// DW x CW signed multiplier by a constant coefficient, and one adder sums
// all products into the SW-bit result sout. The coefficients are computed at
// elaboration by aaf_pkg::fir_coef as round(h*w*2^QSHIFT) of the windowed
// ideal low-pass response, so the taps sum to about 2^QSHIFT (unity DC gain
// after fir_scaler shifts right by QSHIFT).
//
// Interface and timing: on each clock with sam_en high the delay line shifts
// din in and sout is loaded with the sum that includes that same din, so
// sout is valid one clock after the strobe and holds until the next one.
// The filter's group delay is (NTAPS-1)/2 = 750 samples. The sum is one
// large combinational tree feeding sout; its inputs change only at a strobe,
// so it has a whole sample period (1000 clocks by default) to settle, which
// a multicycle timing constraint on sout can express.
//
// The original design's: order, tap count, 10-bit signed data and coefficients,
// 1501 parallel multipliers, 1500 delay registers, one adder with a 30-bit
// result, Hamming-windowed sinc coefficients for Fc = 3400 Hz, Fs = 50 kHz.
// This design's: the coefficient scale 2^11 (the original design only says the taps
// are signed 10-bit), rounding to nearest, clock-enable timing and the reset
// of the delay line.
module fir_lpf
  import aaf_pkg::*;
#(
  parameter int unsigned NTAPS  = 1501,
  parameter int unsigned DW     = 10,
  parameter int unsigned CW     = 10,
  parameter int unsigned SW     = 30,
  parameter int unsigned FC_HZ  = 3400,
  parameter int unsigned FS_HZ  = 50000,
  parameter int unsigned QSHIFT = 11
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sam_en,
  input  logic signed [DW-1:0] din,
  output logic signed [SW-1:0] sout
);

  logic signed [CW-1:0] h [NTAPS];
  logic signed [DW-1:0] z [1:NTAPS-1];

  for (genvar m = 0; m < NTAPS; m++) begin : g_coef
    localparam logic signed [CW-1:0] HM =
      CW'(fir_coef(m, int'(NTAPS) - 1, real'(FC_HZ), real'(FS_HZ), int'(QSHIFT)));
    assign h[m] = HM;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int m = 1; m < NTAPS; m++) z[m] <= '0;
      sout <= '0;
    end else if (sam_en) begin
      automatic logic signed [SW-1:0] acc = SW'(din * h[0]);
      for (int m = 1; m < NTAPS; m++) acc += SW'(z[m] * h[m]);
      sout <= acc;
      z[1] <= din;
      for (int m = 2; m < NTAPS; m++) z[m] <= z[m-1];
    end
  end

endmodule
