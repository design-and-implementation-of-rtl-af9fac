// tb_fir_scaler: compares the scaler with floor(s / 2048) clipped to
// -512..511 for the range edges, values around the clipping points and
// 100000 random sums.
module tb_fir_scaler;
  import aaf_ref_pkg::*;
  logic signed [29:0] sout;
  logic signed [9:0]  y;
  int checks = 0, failures = 0, clips = 0;

  fir_scaler dut (.sout, .y);

  task automatic try(longint v);
    sout = 30'(v); #1;
    checks++;
    if (int'(y) != ref_scale(longint'(sout))) begin
      failures++;
      if (failures < 10) $display("FAIL sout=%0d y=%0d expected %0d", sout, y, ref_scale(longint'(sout)));
    end
    if (ref_scale(longint'(sout)) inside {511, -512}) clips++;
  endtask

  initial begin
    longint edges [$] = '{0, 1, -1, 2047, 2048, -2048, -2049, 511*2048, 511*2048+2047,
                          512*2048, -512*2048, -512*2048-1, 536870911, -536870912};
    foreach (edges[i]) try(edges[i]);
    for (int i = 0; i < 100000; i++) begin
      if (i % 2 == 0) try(longint'($signed($urandom_range(0, 32'h7FFFF))) - 32'sh40000 + ((i % 4 == 0) ? 0 : 1000000));
      else            try(longint'($signed(30'($urandom()))));
    end
    checks++;
    if (clips == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
