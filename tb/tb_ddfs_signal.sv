// tb_ddfs_signal: drives the base band synthesizer with the 2000 Hz code
// and a sample strobe every 4 clocks. Checks each output sample against the
// model (phase of the previous strobe, top 14 bits, sine formula) and that
// 500 samples (10 ms at 50 kHz) hold exactly 20 rising mid-scale crossings,
// i.e. 2000 Hz. A second pass with a different code checks 5 kHz.
module tb_ddfs_signal;
  import aaf_ref_pkg::*;
  logic clk = 0, rst = 1, sam_en = 0;
  logic [31:0] l_sig = 32'd171798692;
  logic [9:0]  signal;
  int checks = 0, failures = 0;

  ddfs_signal dut (.clk, .rst, .sam_en, .l_sig, .signal);

  always #5 clk = ~clk;

  task automatic run(logic [31:0] code, int exp_cross);
    logic [31:0] ph;
    int crossings, prev;
    l_sig = code; ph = '0; crossings = 0; prev = 1023;
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    for (int k = 1; k <= 501; k++) begin
      repeat (3) @(negedge clk);
      sam_en = 1; @(negedge clk); sam_en = 0;
      // after strobe k the ROM shows the phase of k-1 steps
      if (k >= 2) begin
        checks++;
        if (int'(signal) != ref_sine(longint'(ph[31:18]), 14)) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: %0d expected %0d", k, signal, ref_sine(longint'(ph[31:18]), 14));
        end
        if (prev < 512 && int'(signal) >= 512) crossings++;
        prev = int'(signal);
      end
      ph = ph + code;
    end
    checks++;
    if (crossings != exp_cross) begin
      failures++; $display("FAIL %0d crossings in 500 samples, expected %0d", crossings, exp_cross);
    end
  endtask

  initial begin
    run(32'd171798692, 20);            // 2000 Hz
    run(32'd429496730, 50);            // 5000 Hz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
