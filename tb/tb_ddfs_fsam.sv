// tb_ddfs_fsam: runs the sample-pulse synthesizer with the 50 kHz code for
// 2 ms of 50 MHz clock (100000 clocks). Checks f_sam and sam_en against a
// model clock by clock, that sam_en strobes are 1000 or 1001 clocks apart
// (50 MHz / 50 kHz = 1000), and that 100 strobes occur.
module tb_ddfs_fsam;
  localparam logic [31:0] L_SAM = 32'd4294967;
  logic clk = 0, rst = 1;
  logic f_sam, sam_en;
  logic [31:0] ph = '0;
  logic f_q = 0, en_m = 0;
  int checks = 0, failures = 0, strobes = 0, last = -1;

  ddfs_fsam dut (.clk, .rst, .l_sam(L_SAM), .f_sam, .sam_en);

  always #10 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 100000; c++) begin
      @(posedge clk);
      en_m = ph[31] & ~f_q;
      f_q  = ph[31];
      ph   = ph + L_SAM;
      #1;
      checks++;
      if (f_sam !== ph[31] || sam_en !== en_m) begin
        failures++;
        if (failures < 10) $display("FAIL clock %0d: f_sam=%b sam_en=%b expected %b %b", c, f_sam, sam_en, ph[31], en_m);
      end
      if (sam_en) begin
        if (last >= 0) begin
          checks++;
          if (!(c - last inside {1000, 1001})) begin
            failures++; $display("FAIL strobe interval %0d", c - last);
          end
        end
        last = c; strobes++;
      end
    end
    checks++;
    if (strobes != 100) begin failures++; $display("FAIL %0d strobes in 2 ms", strobes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
