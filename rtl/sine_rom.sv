// sine_rom: one period of a sine wave, 2^AW words of DW bits, read
// synchronously. It serves as ROM0 of the signal synthesizer and ROM1 of the
// interference synthesizer.
//
// Word a holds the offset-binary sample 512 + floor(511*sin(2*pi*a/2^AW))
// (range 1..1023, mid-scale 512), the relation the original design gives. The table
// is computed at elaboration by aaf_pkg::sine_sample, so no data file is
// needed. A read takes one enabled clock: q shows the word at the address
// presented on the previous enabled edge, like a ROM clocked by the sample
// pulse. Sizes (16384 x 10 bits) are the original design's. q is not reset; it is
// loaded on the first enabled clock.
module sine_rom
  import aaf_pkg::*;
#(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 10
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] q
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int unsigned a = 0; a < 2**AW; a++) mem[a] = DW'(sine_sample(a, AW));
  end

  always_ff @(posedge clk) begin
    if (en) q <= mem[addr];
  end

endmodule
