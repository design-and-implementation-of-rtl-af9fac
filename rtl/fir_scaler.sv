// fir_scaler: output scaler of the FIR filter, reducing the SW-bit
// convolution sum to the DW-bit signed word y(n) sent to the output DAC.
//
// It divides by 2^SHIFT with an arithmetic shift (rounding towards minus
// infinity) and saturates to the signed DW-bit range, so a result that would
// overflow clips at -2^(DW-1) or 2^(DW-1)-1 instead of wrapping. SHIFT = 11
// matches the coefficient scale of fir_lpf and gives the filter unity gain
// in its pass band. Purely combinational. The original design shows a scaler
// between the adder and DAC2 but not its rule; shift and saturation are
// this design's choice.
module fir_scaler #(
  parameter int unsigned SW    = 30,
  parameter int unsigned DW    = 10,
  parameter int unsigned SHIFT = 11
) (
  input  logic signed [SW-1:0] sout,
  output logic signed [DW-1:0] y
);

  localparam logic signed [SW-1:0] YMAX = SW'((2**(DW-1)) - 1);
  localparam logic signed [SW-1:0] YMIN = -SW'(2**(DW-1));

  logic signed [SW-1:0] shifted;

  always_comb begin
    shifted = sout >>> SHIFT;
    if (shifted > YMAX)      y = DW'(YMAX);
    else if (shifted < YMIN) y = DW'(YMIN);
    else                     y = DW'(shifted);
  end

endmodule
