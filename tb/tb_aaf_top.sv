// tb_aaf_top: end-to-end test of the whole system at its default
// parameters (50 MHz clock, 50 kHz samples, 1501 taps).
//
// The four test set-ups are run in turn without reset: tone only, tone +
// 3500 Hz, tone + 3900 Hz, tone + white noise. In each, after 1600 samples
// for the filter to fill, 500 samples of the filter input and output are
// analysed (500 samples hold whole periods of 2000, 3500 and 3900 Hz).
// Checks:
//  - every output word equals floor(sum h(m) x(n-m) / 2^11), clipped, with
//    x the filter input words seen at the strobes and h the reference taps;
//  - strobes come every 1000 or 1001 clocks;
//  - tone only: the output is the input delayed by 750 samples (linear
//    phase), within 3 LSB, and the tone keeps its amplitude within 3 %;
//  - 3500 Hz: the interferer is attenuated by at least 30 dB;
//  - 3900 Hz: by at least 45 dB;
//  - noise: the noise power (input minus tone) drops by at least 3 dB. The
//    noise words are six adjacent bits of a shift register, so successive
//    words share five bits and the noise is far from white: most of its
//    power lies in the pass band and the drop is about 4.7 dB, not the
//    8.7 dB white noise would give.
// Each set-up and each mode switch is counted and must occur.
module tb_aaf_top;
  import aaf_ref_pkg::*;
  localparam int N = 1501, SETTLE = 1600, WIN = 500;
  logic clk = 0, rst = 1;
  logic s_s_and_n = 0, n_sin = 0, sin1_sin2 = 1;
  logic f_sam;
  logic signed [9:0] inp_filter, out_filter;
  int checks = 0, failures = 0;
  int h [N];
  int xs [$];                       // filter input history, newest last
  real vin [$], vout [$];           // analysis windows
  int mode_runs [4], switches = 0, strobes = 0, last_strobe = -1, cyc = 0;

  aaf_top dut (.clk, .rst, .s_s_and_n, .n_sin, .sin1_sin2, .f_sam, .inp_filter, .out_filter);

  always #10 clk = ~clk;            // 50 MHz
  always @(posedge clk) cyc++;

  function automatic int model_out();
    longint acc = 0;
    for (int m = 0; m < N && m < xs.size(); m++) acc += longint'(h[m]) * xs[xs.size()-1-m];
    return ref_scale(acc);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // wait for the next strobe, record the filter input it takes, then check
  // the output one clock later
  task automatic next_sample(bit keep);
    do @(posedge clk); while (!dut.sam_en);
    strobes++;
    if (last_strobe >= 0 && !((cyc - last_strobe) inside {1000, 1001}))
      fail($sformatf("strobe interval %0d", cyc - last_strobe));
    last_strobe = cyc;
    xs.push_back(int'(inp_filter));
    if (xs.size() > N) void'(xs.pop_front());
    @(negedge clk);
    checks++;
    if (int'(out_filter) != model_out())
      fail($sformatf("sample %0d: out=%0d expected %0d", strobes, out_filter, model_out()));
    if (keep) begin
      vin.push_back(real'(xs[xs.size()-1]));
      vout.push_back(real'(out_filter));
    end
  endtask

  function automatic real db(real a, real b);
    return 20.0 * $log10(a / b);
  endfunction

  task automatic run_mode(int mode);
    real a_in, a_out, i_in, i_out, p_in, p_out, t_re, t_im;
    int lag_err;
    if (mode != 0) switches++;
    s_s_and_n = (mode != 0);
    n_sin     = (mode == 3);
    sin1_sin2 = (mode == 1);
    vin.delete(); vout.delete();
    for (int i = 0; i < SETTLE; i++) next_sample(i >= SETTLE - 750);
    for (int i = 0; i < WIN; i++) next_sample(1'b1);
    // windows: vin[0..] starts 750 samples before vout's analysed part
    a_in  = dft_amp(vin, 750, WIN, 0.04);
    a_out = dft_amp(vout, 750, WIN, 0.04);
    mode_runs[mode]++;
    checks++;
    if (a_out < 0.97 * a_in || a_out > 1.03 * a_in)
      fail($sformatf("mode %0d: tone amplitude in %f out %f", mode, a_in, a_out));
    case (mode)
      0: begin
        lag_err = 0;
        for (int i = 0; i < WIN; i++)
          if (vout[750+i] - vin[i] > 3.0 || vin[i] - vout[750+i] > 3.0) lag_err++;
        checks++;
        if (lag_err != 0) fail($sformatf("output is not the input delayed by 750 samples (%0d misses)", lag_err));
      end
      1, 2: begin
        i_in  = dft_amp(vin, 750, WIN, mode == 1 ? 0.07 : 0.078);
        i_out = dft_amp(vout, 750, WIN, mode == 1 ? 0.07 : 0.078);
        $display("mode %0d: tone %0.1f -> %0.1f, interferer %0.1f -> %0.3f (%0.1f dB)",
                 mode, a_in, a_out, i_in, i_out, db(i_in, i_out + 1e-9));
        checks++;
        if (db(i_in, i_out + 1e-9) < (mode == 1 ? 30.0 : 45.0))
          fail($sformatf("mode %0d: attenuation only %f dB", mode, db(i_in, i_out + 1e-9)));
      end
      3: begin
        // remove the 2000 Hz tone (amplitude and phase fitted on the window)
        p_in = 0.0; p_out = 0.0;
        for (int w = 0; w < 2; w++) begin
          real re, im, p;
          re = 0.0; im = 0.0; p = 0.0;
          for (int i = 0; i < WIN; i++) begin
            real v;
            v = (w == 0) ? vin[750+i] : vout[750+i];
            re += v * $cos(TWO_PI * 0.04 * i);
            im += v * $sin(TWO_PI * 0.04 * i);
          end
          re = 2.0 * re / WIN; im = 2.0 * im / WIN;
          for (int i = 0; i < WIN; i++) begin
            real v;
            v = (w == 0) ? vin[750+i] : vout[750+i];
            v = v - re * $cos(TWO_PI * 0.04 * i) - im * $sin(TWO_PI * 0.04 * i);
            p += v * v;
          end
          if (w == 0) p_in = p; else p_out = p;
        end
        $display("mode 3: tone %0.1f -> %0.1f, noise power reduced by %0.1f dB",
                 a_in, a_out, 10.0 * $log10(p_in / p_out));
        checks++;
        if (10.0 * $log10(p_in / p_out) < 3.0)
          fail($sformatf("noise attenuated only %f dB", 10.0 * $log10(p_in / p_out)));
      end
      default: ;
    endcase
  endtask

  initial begin
    for (int m = 0; m < N; m++) h[m] = ref_coef(m, N - 1);
    repeat (3) @(negedge clk);
    rst = 0;
    // first strobes: the sine ROMs have not been read yet, skip them
    repeat (3) begin
      do @(posedge clk); while (!dut.sam_en);
      last_strobe = cyc;
      xs.push_back(int'(inp_filter));
    end
    @(negedge clk);
    for (int mode = 0; mode < 4; mode++) run_mode(mode);
    foreach (mode_runs[m]) begin
      checks++;
      if (mode_runs[m] == 0) fail($sformatf("set-up %0d never ran", m));
    end
    checks++;
    if (switches != 3) fail("mode switches missing");
    $display("set-ups run: tone %0d, +3500 Hz %0d, +3900 Hz %0d, +noise %0d; switches %0d; strobes %0d",
             mode_runs[0], mode_runs[1], mode_runs[2], mode_runs[3], switches, strobes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
