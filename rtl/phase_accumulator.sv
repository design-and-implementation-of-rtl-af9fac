// phase_accumulator: W-bit unsigned phase accumulator, the core of each
// direct digital frequency synthesizer (DDFS) in the design.
//
// Every clock in which en is high the register adds the frequency code inc,
// wrapping modulo 2^W, so its top bits sweep one period F_ref*inc/2^W times a
// second, where F_ref is the rate of en. rst clears the register
// asynchronously, as the accumulator's clear input does in the original
// schematics. acc is the register itself: it changes one clock after an
// enabled edge. Width and function follow the original design (32 bits, unsigned);
// the enable input is this design's way of running every synthesizer from
// the one 50 MHz clock instead of clocking it with the sample pulse.
module phase_accumulator #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] inc,
  output logic [W-1:0] acc
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     acc <= '0;
    else if (en) acc <= acc + inc;
  end

endmodule
