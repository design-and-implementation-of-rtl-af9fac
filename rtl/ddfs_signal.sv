// ddfs_signal: direct digital frequency synthesizer of the base band test
// tone (2000 Hz by default).
//
// A 32-bit phase accumulator adds the frequency code l_sig at every sample
// strobe; its top 14 bits, A[31:18], address the sine ROM (ROM0), whose
// registered output is the offset-binary tone sample. Output frequency is
// F_sam * l_sig / 2^32; with F_sam = 50 kHz and l_sig = 171798692 that is
// 2000 Hz. Structure, widths and code are the original design's. Timing: after the
// k-th strobe following reset, signal holds ROM[phase after k-1 steps], i.e.
// the tone lags the accumulator by one sample.
module ddfs_signal #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          sam_en,
  input  logic [W-1:0]  l_sig,
  output logic [DW-1:0] signal
);

  logic [W-1:0] phase;

  phase_accumulator #(.W(W)) u_pa (
    .clk, .rst, .en(sam_en), .inc(l_sig), .acc(phase)
  );

  sine_rom #(.AW(AW), .DW(DW)) u_rom0 (
    .clk, .en(sam_en), .addr(phase[W-1 -: AW]), .q(signal)
  );

endmodule
