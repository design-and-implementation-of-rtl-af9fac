// tb_ddfs_interference: drives the interference synthesizer with the
// 3500 Hz and 3900 Hz codes. Each sample is compared with the model (the
// multiplexer picks l_sin1 when sin1_sin2 = 1), and 500 samples must hold 35
// rising mid-scale crossings at 3500 Hz and 38 at 3900 Hz (phase steps
// 1..500; the 3900 Hz code is slightly low, so its 39th crossing falls
// just after step 500). A final run
// switches the select in mid-stream and checks that the phase continues.
module tb_ddfs_interference;
  import aaf_ref_pkg::*;
  localparam logic [31:0] L1 = 32'd300647711, L2 = 32'd335007449;
  logic clk = 0, rst = 1, sam_en = 0, sel = 1;
  logic [9:0]  sin;
  logic [31:0] ph;
  int checks = 0, failures = 0, crossings, prev;

  ddfs_interference dut (.clk, .rst, .sam_en, .sin1_sin2(sel), .l_sin1(L1), .l_sin2(L2), .sin);

  always #5 clk = ~clk;

  task automatic strobe_and_check(int k);
    repeat (2) @(negedge clk);
    sam_en = 1; @(negedge clk); sam_en = 0;
    if (k >= 2) begin
      checks++;
      if (int'(sin) != ref_sine(longint'(ph[31:18]), 14)) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: %0d expected %0d", k, sin, ref_sine(longint'(ph[31:18]), 14));
      end
      if (prev < 512 && int'(sin) >= 512) crossings++;
      prev = int'(sin);
    end
    ph = ph + (sel ? L1 : L2);
  endtask

  task automatic run(logic s, int exp_cross);
    sel = s; ph = '0; crossings = 0; prev = 1023;
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    for (int k = 1; k <= 501; k++) strobe_and_check(k);
    checks++;
    if (crossings != exp_cross) begin
      failures++; $display("FAIL sel=%b: %0d crossings, expected %0d", s, crossings, exp_cross);
    end
  endtask

  initial begin
    run(1'b1, 35);
    run(1'b0, 38);  // code is 0.09 below 2^32*3900/50000: cycle 39 ends just after step 500
    // switch mid-stream: 3500 Hz, then 3900 Hz without reset
    sel = 1; ph = '0; prev = 0;
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    for (int k = 1; k <= 200; k++) begin
      if (k == 101) sel = 0;
      strobe_and_check(k);
    end
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
