// tb_phase_accumulator: checks the 32-bit phase accumulator against a
// software model: random codes and enables for 20000 clocks, wrap-around
// from near 2^32, and an asynchronous clear in mid-run.
module tb_phase_accumulator;
  localparam int W = 32;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] inc = '0, acc, model = '0;
  int checks = 0, failures = 0, wraps = 0;

  phase_accumulator dut (.clk, .rst, .en, .inc, .acc);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (acc !== model) begin
      failures++;
      $display("FAIL %s: acc=%h expected %h", what, acc, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check("after reset");
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      inc = (i < 10) ? 32'hF000_0000 : $urandom();
      @(posedge clk); #1;
      if (en) begin
        if (W'(model + inc) < model) wraps++;
        model = model + inc;
      end
      check("step");
      if (i == 12345) begin
        rst = 1; #1; model = '0; check("async clear"); rst = 0;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
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
