// tb_signal_simulator: checks the test-signal source in its four set-ups:
// tone only, tone + 3500 Hz, tone + 3900 Hz, tone + noise. For each strobe
// the expected x is rebuilt from models of the two synthesizers and the
// noise register: tone and interferer as (ROM word - 512), noise as 4*wn,
// x = (tone [+ interferer]) >>> 1. Set-ups are switched without reset, so
// the models run continuously.
module tb_signal_simulator;
  import aaf_ref_pkg::*;
  localparam logic [31:0] LS = 32'd171798692, L1 = 32'd300647711, L2 = 32'd335007449;
  logic clk = 0, rst = 1, sam_en = 0;
  logic s_s_and_n = 0, n_sin = 0, sin1_sin2 = 1;
  logic signed [9:0] x;
  int checks = 0, failures = 0;
  int mode_hits [4];

  signal_simulator dut (.clk, .rst, .sam_en, .s_s_and_n, .n_sin, .sin1_sin2,
                        .l_sig(LS), .l_sin1(L1), .l_sin2(L2), .x);

  always #5 clk = ~clk;

  // model state
  logic [31:0] ph_s = '0, ph_i = '0;
  int rom_s = 0, rom_i = 0;            // ROM outputs
  logic [39:0] sh = '0;
  int d1 = 0, wn = 0;                  // noise pipeline

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 1; k <= 2000; k++) begin
      int mode, tone, intf, exp_x;
      mode = (k / 500) % 4;            // 0 tone, 1 +3500, 2 +3900, 3 +noise
      s_s_and_n = (mode != 0);
      n_sin     = (mode == 3);
      sin1_sin2 = (mode == 1);
      @(negedge clk); sam_en = 1;
      // expected x uses the ROM words and noise before this strobe
      tone = rom_s - 512;
      intf = n_sin ? 4 * wn : rom_i - 512;
      exp_x = (s_s_and_n ? tone + intf : tone) >>> 1;
      @(negedge clk); sam_en = 0;
      // advance the models by one strobe
      rom_s = ref_sine(longint'(ph_s[31:18]), 14);
      rom_i = ref_sine(longint'(ph_i[31:18]), 14);
      ph_s  = ph_s + LS;
      ph_i  = ph_i + (sin1_sin2 ? L1 : L2);
      wn    = d1;
      d1    = int'(sh[39:34]) - 32;
      sh    = ref_lfsr_step(sh);
      if (k >= 3) begin
        checks++;
        mode_hits[mode]++;
        if (int'(x) != exp_x) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d mode %0d: x=%0d expected %0d", k, mode, x, exp_x);
        end
      end
    end
    foreach (mode_hits[m]) begin
      checks++;
      if (mode_hits[m] == 0) begin failures++; $display("FAIL mode %0d never run", m); end
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
