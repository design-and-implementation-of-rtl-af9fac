// dpng: digital pseudo-noise generator for the white-noise interferer.
//
// A K-bit register (K = 40) shifts left at every sample strobe; the bit
// shifted in is NOT(SH[K-1] XOR SH[TAP]), with TAP = 2, so the all-zero
// state left by reset is a legal state and the all-ones state is the one
// that locks up. The top six bits SH[K-1:K-6], read as an unsigned number,
// minus 32 give a value in -32..31 (mean -1/2); this is registered and then
// passed through a second register (the original design multiplies it by 1 in a
// signed multiplier) that sign-extends it to the 8-bit output wn. Register,
// feedback gates, taps and the subtract-32 / times-1 chain are the
// original design's; the clock enable and the reset of the two output registers
// are this design's. Timing: wn lags the shift register by two strobes.
module dpng #(
  parameter int unsigned K   = 40,
  parameter int unsigned TAP = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sam_en,
  output logic signed [7:0] wn
);

  logic [K-1:0]        sh;
  logic                shiftin;
  logic signed [5:0]   diff;

  assign shiftin = ~(sh[K-1] ^ sh[TAP]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sh   <= '0;
      diff <= '0;
      wn   <= '0;
    end else if (sam_en) begin
      sh   <= {sh[K-2:0], shiftin};
      diff <= sh[K-1 -: 6] - 6'd32;
      wn   <= 8'(diff);
    end
  end

endmodule
