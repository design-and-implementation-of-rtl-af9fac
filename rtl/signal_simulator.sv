// signal_simulator: base band signal simulator, the test source of the
// filter.
//
// It runs three generators on the sample strobe: the base band tone
// (ddfs_signal, ROM0), the sinusoidal interferer (ddfs_interference, ROM1,
// 3500 or 3900 Hz) and the pseudo-noise generator (dpng). The ROM samples
// are offset binary and are turned into signed values by subtracting 512
// (range -511..511). The noise value (-32..31) is multiplied by 4, giving
// about 25 % of the tone amplitude as the original design specifies; the sinusoid
// has the tone's full amplitude (input SNR 1/1). The adder then forms
//   x = (tone + interference) / 2      (arithmetic shift, s_s_and_n = 1)
//   x = tone / 2                        (s_s_and_n = 0)
// so that the worst case, two full-scale sines, still fits the signed 10-bit
// word. n_sin = 1 selects the noise, 0 the sinusoid. The original design shows the
// adder and the selections but not the scaling; halving and the 4x noise
// gain are this design's choices. x is registered on the sample strobe: it
// follows the ROM outputs by one strobe.
module signal_simulator #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sam_en,
  input  logic                 s_s_and_n,
  input  logic                 n_sin,
  input  logic                 sin1_sin2,
  input  logic [W-1:0]         l_sig,
  input  logic [W-1:0]         l_sin1,
  input  logic [W-1:0]         l_sin2,
  output logic signed [DW-1:0] x
);

  localparam logic signed [DW+1:0] MID = (DW+2)'(2**(DW-1));

  logic [DW-1:0]        sig_u, sin_u;
  logic signed [7:0]    wn;
  logic signed [DW+1:0] sig_s, sin_s, noise_s, intf_s, sum;

  ddfs_signal #(.W(W), .AW(AW), .DW(DW)) u_ddfs_signal (
    .clk, .rst, .sam_en, .l_sig, .signal(sig_u)
  );

  ddfs_interference #(.W(W), .AW(AW), .DW(DW)) u_ddfs_interference (
    .clk, .rst, .sam_en, .sin1_sin2, .l_sin1, .l_sin2, .sin(sin_u)
  );

  dpng u_dpng (
    .clk, .rst, .sam_en, .wn
  );

  always_comb begin
    sig_s   = $signed({2'b00, sig_u}) - MID;
    sin_s   = $signed({2'b00, sin_u}) - MID;
    noise_s = (DW+2)'(wn) <<< 2;
    intf_s  = n_sin ? noise_s : sin_s;
    sum     = s_s_and_n ? sig_s + intf_s : sig_s;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         x <= '0;
    else if (sam_en) x <= DW'(sum >>> 1);
  end

endmodule
