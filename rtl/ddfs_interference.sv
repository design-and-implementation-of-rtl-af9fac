// ddfs_interference: direct digital frequency synthesizer of the sinusoidal
// interferer, 3500 Hz or 3900 Hz.
//
// A 2:1 multiplexer picks the frequency code (sin1_sin2 = 1 selects l_sin1,
// the 3500 Hz code on the multiplexer's data1 input; 0 selects l_sin2, the
// 3900 Hz code); a 32-bit phase accumulator adds it at every sample strobe
// and its top 14 bits address the sine ROM (ROM1). Structure, widths and
// codes are the original design's. Switching sin1_sin2 changes the phase step from
// the next strobe on, so the tone changes frequency without a phase jump.
// Timing as in ddfs_signal: one sample from accumulator to sin.
module ddfs_interference #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          sam_en,
  input  logic          sin1_sin2,
  input  logic [W-1:0]  l_sin1,
  input  logic [W-1:0]  l_sin2,
  output logic [DW-1:0] sin
);

  logic [W-1:0] l_sin;
  logic [W-1:0] phase;

  assign l_sin = sin1_sin2 ? l_sin1 : l_sin2;

  phase_accumulator #(.W(W)) u_pa (
    .clk, .rst, .en(sam_en), .inc(l_sin), .acc(phase)
  );

  sine_rom #(.AW(AW), .DW(DW)) u_rom1 (
    .clk, .en(sam_en), .addr(phase[W-1 -: AW]), .q(sin)
  );

endmodule
