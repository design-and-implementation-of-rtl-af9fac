// tb_dpng: runs the pseudo-noise generator for 20000 sample strobes and
// compares wn with a model of the 40-bit register (feedback
// NOT(SH[39] XOR SH[2]), output = SH[39:34] - 32, two strobes later). Also
// checks the range -32..31, that the mean is near zero, and that wn holds
// between strobes.
module tb_dpng;
  import aaf_ref_pkg::*;
  logic clk = 0, rst = 1, sam_en = 0;
  logic signed [7:0] wn;
  logic [39:0] s = '0;
  int d1 = 0, d2 = 0;
  int checks = 0, failures = 0;
  longint sum = 0;
  int lo = 0, hi = 0;

  dpng dut (.clk, .rst, .sam_en, .wn);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk); sam_en = 1;
      @(negedge clk); sam_en = 0;
      d2 = d1;
      d1 = int'(s[39:34]) - 32;
      s  = ref_lfsr_step(s);
      checks++;
      if (int'(wn) != d2) begin
        failures++;
        if (failures < 10) $display("FAIL strobe %0d: wn=%0d expected %0d", k, wn, d2);
      end
      sum += wn;
      if (wn == -32) lo++;
      if (wn == 31)  hi++;
      @(negedge clk);
      checks++;
      if (int'(wn) != d2) begin failures++; $display("FAIL wn changed without strobe"); end
    end
    checks++;
    if (sum > 20000 || sum < -20000) begin failures++; $display("FAIL mean %0d/20000", sum); end
    checks++;
    if (lo == 0 || hi == 0) begin failures++; $display("FAIL extremes not reached (%0d, %0d)", lo, hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
