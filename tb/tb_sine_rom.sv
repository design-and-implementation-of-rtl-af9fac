// tb_sine_rom: reads every word of the 16384 x 10 sine table and compares
// it with the reference formula, checks four landmark values (0, 90, 180 and
// 270 degrees), the one-clock read latency, and that q holds while en is low.
module tb_sine_rom;
  import aaf_ref_pkg::*;
  logic clk = 0, en = 0;
  logic [13:0] addr = '0;
  logic [9:0]  q;
  int checks = 0, failures = 0;

  sine_rom dut (.clk, .en, .addr, .q);

  always #5 clk = ~clk;

  task automatic expect_q(int exp, string what);
    checks++;
    if (int'(q) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: addr=%0d q=%0d expected %0d", what, addr, q, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 16384; a++) begin
      @(negedge clk); addr = 14'(a); en = 1;
      @(posedge clk); #1;
      expect_q(ref_sine(a, 14), "table");
    end
    // landmarks of the table: mid, top, mid, bottom
    @(negedge clk); addr = 14'd4096; @(posedge clk); #1; expect_q(1023, "90 deg");
    @(negedge clk); addr = 14'd12288; @(posedge clk); #1; expect_q(1, "270 deg");
    @(negedge clk); addr = 14'd0; @(posedge clk); #1; expect_q(512, "0 deg");
    // hold while disabled
    @(negedge clk); en = 0; addr = 14'd4096; @(posedge clk); #1; expect_q(512, "hold");
    // latency: data appears only after the clock edge
    @(negedge clk); en = 1; addr = 14'd4096; #1; expect_q(512, "before edge");
    @(posedge clk); #1; expect_q(1023, "after edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
