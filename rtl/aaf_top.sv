// aaf_top: on-chip part of the anti-aliasing filter test system.
//
// A base band test signal (2000 Hz tone) is synthesized, optionally mixed
// with one interferer (a 3500 Hz or 3900 Hz sinusoid of equal amplitude, or
// pseudo-random white noise of about a quarter of its amplitude), and passed
// through a 1500th-order FIR low-pass filter with a 3400 Hz cut-off. The
// filter input and the scaled filter output are the two 10-bit words that
// drive the input and output DACs; f_sam is the 50 kHz sample pulse that
// clocks them.
//
//   clk (50 MHz) -> ddfs_fsam -> sam_en (one strobe per sample)
//   signal_simulator (tone + interferer) -> inp_filter
//   inp_filter -> fir_lpf -> fir_scaler -> out_filter
//
// The frequency codes are parameters with the original design's values; the three
// inputs s_s_and_n, n_sin and sin1_sin2 are the switches of the test set-up.
// Everything runs on clk with sam_en as clock enable. Timing per strobe:
// inp_filter is updated one clock after sam_en, the filter takes the value
// present at the next strobe, and out_filter follows that strobe by one
// clock. All data words are two's complement.
module aaf_top
  import aaf_pkg::*;
#(
  parameter logic [31:0]  L_SIG  = L_SIG_2000HZ,
  parameter logic [31:0]  L_SIN1 = L_SIN1_3500HZ,
  parameter logic [31:0]  L_SIN2 = L_SIN2_3900HZ,
  parameter logic [31:0]  L_SAM  = L_SAM_50KHZ,
  parameter int unsigned  NTAPS  = 1501
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              s_s_and_n,
  input  logic              n_sin,
  input  logic              sin1_sin2,
  output logic              f_sam,
  output logic signed [9:0] inp_filter,
  output logic signed [9:0] out_filter
);

  logic                     sam_en;
  logic signed [SUM_W-1:0]  sout;

  ddfs_fsam #(.W(PA_W)) u_ddfs_fsam (
    .clk, .rst, .l_sam(L_SAM), .f_sam, .sam_en
  );

  signal_simulator #(.W(PA_W), .AW(ROM_AW), .DW(SMP_W)) u_sim (
    .clk, .rst, .sam_en, .s_s_and_n, .n_sin, .sin1_sin2,
    .l_sig(L_SIG), .l_sin1(L_SIN1), .l_sin2(L_SIN2), .x(inp_filter)
  );

  fir_lpf #(
    .NTAPS(NTAPS), .DW(SMP_W), .CW(COEF_W), .SW(SUM_W),
    .FC_HZ(3400), .FS_HZ(50000), .QSHIFT(FIR_QSHIFT)
  ) u_fir (
    .clk, .rst, .sam_en, .din(inp_filter), .sout
  );

  fir_scaler #(.SW(SUM_W), .DW(SMP_W), .SHIFT(FIR_QSHIFT)) u_scaler (
    .sout, .y(out_filter)
  );

endmodule
