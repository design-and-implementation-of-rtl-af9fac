// tb_fir_lpf: full-size (1501-tap) check of the FIR filter.
//  1. Impulse of height 511: the 1501 outputs must be 511*h(m) with h from
//     the reference design formula, and then zero; the taps must be
//     symmetric and sum to about 2^11 (unity DC gain after scaling).
//  2. 3200 random samples: every output is compared with a direct
//     convolution in the testbench.
//  3. Timing: sout changes exactly one clock after a strobe and holds in
//     between.
module tb_fir_lpf;
  import aaf_ref_pkg::*;
  localparam int N = 1501;
  logic clk = 0, rst = 1, sam_en = 0;
  logic signed [9:0]  din = '0;
  logic signed [29:0] sout;
  int checks = 0, failures = 0;
  int h [N];
  int xs [$];

  fir_lpf dut (.clk, .rst, .sam_en, .din, .sout);

  always #5 clk = ~clk;

  function automatic longint conv();
    longint acc = 0;
    for (int m = 0; m < N && m < xs.size(); m++) acc += longint'(h[m]) * xs[xs.size()-1-m];
    return acc;
  endfunction

  task automatic sample(int v);
    longint prev_sout;
    @(negedge clk); din = 10'(v); sam_en = 1;
    prev_sout = longint'(sout);
    xs.push_back(v);
    if (xs.size() > N) void'(xs.pop_front());
    #1;
    checks++;
    if (longint'(sout) != prev_sout) begin failures++; $display("FAIL sout changed before the edge"); end
    @(negedge clk); sam_en = 0;
    checks++;
    if (longint'(sout) != conv()) begin
      failures++;
      if (failures < 10) $display("FAIL sample %0d: sout=%0d expected %0d", xs.size(), sout, conv());
    end
    @(negedge clk);
    checks++;
    if (longint'(sout) != conv()) begin failures++; $display("FAIL sout did not hold"); end
  endtask

  initial begin
    int sum = 0;
    for (int m = 0; m < N; m++) begin h[m] = ref_coef(m, N - 1); sum += h[m]; end
    checks++;
    if (sum < 2040 || sum > 2056) begin failures++; $display("FAIL reference taps sum to %0d", sum); end
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. impulse response
    sample(511);
    for (int m = 1; m < N + 10; m++) sample(0);
    // 2. random data
    for (int i = 0; i < 3200; i++) sample(int'($urandom_range(0, 1023)) - 512);
    // async clear empties the delay line
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    xs.delete();
    checks++;
    if (sout != 0) begin failures++; $display("FAIL clear"); end
    sample(100);
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
