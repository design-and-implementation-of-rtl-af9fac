// ddfs_fsam: synthesizer of the 50 kHz sample pulses from the 50 MHz clock.
//
// A 32-bit phase accumulator adds l_sam on every clock; its most significant
// bit is the sample pulse f_sam, a square wave of frequency
// F_clk * l_sam / 2^32 (49999.99 Hz for l_sam = 4294967). This much is the
// original design's. The original design clocks the rest of the system with that pulse;
// here everything stays on clk, and sam_en is a one-clock strobe on each
// rising edge of f_sam that the other blocks use as a clock enable. sam_en
// is registered: it is high in the clock after f_sam has risen. The
// asynchronous clear is this design's addition, so that simulation and
// hardware start from a known phase.
module ddfs_fsam #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] l_sam,
  output logic         f_sam,
  output logic         sam_en
);

  logic [W-1:0] phase;
  logic         f_sam_q;

  phase_accumulator #(.W(W)) u_pa (
    .clk, .rst, .en(1'b1), .inc(l_sam), .acc(phase)
  );

  assign f_sam = phase[W-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      f_sam_q <= 1'b0;
      sam_en  <= 1'b0;
    end else begin
      f_sam_q <= f_sam;
      sam_en  <= f_sam & ~f_sam_q;
    end
  end

  // The strobe is a single-clock pulse: every enabled block takes exactly
  // one step per sample.
  a_single_strobe: assert property (@(posedge clk) sam_en |=> !sam_en)
    else $error("sam_en high for two clocks in a row");

endmodule
