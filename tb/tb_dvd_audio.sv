// tb_dvd_audio: the amplifier at DVD-audio input, 24-bit PCM at 96 kS/s.
//
// The top is built with PCM_W = 24; the clock is 2048 * 96 kHz = 196.608 MHz
// (the bridge model integrates with that period). A 1 kHz tone of 0.5 full
// scale, with its 24-bit resolution kept, is played into a 4 ohm load with
// the current-sign feedback on; ten tone periods (960 samples) are analysed.
// A 16-bit amplifier at 96 kS/s runs beside it on the same tone, so the two
// widths can be compared. Checks: both fundamentals within 3 % of the tone;
// THD of the window-averaged bridge output below 0.5 % for both; THD of the
// two widths within 0.05 % of each other (the 7-bit noise shaper, not the
// input width, sets the distortion); no shoot-through.
module tb_dvd_audio;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d24, d16;
  real  t24, t16, f24, f16;
  int   s24, s16;

  amp_tone_bench #(.PCM_W(24), .FIN(96000)) b24 (
    .clk, .rst_n, .done(d24), .thd(t24), .fund(f24), .shoot_clocks(s24)
  );
  amp_tone_bench #(.PCM_W(16), .FIN(96000)) b16 (
    .clk, .rst_n, .done(d16), .thd(t16), .fund(f16), .shoot_clocks(s16)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    real d;
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (d24 && d16);
    $display("24 bit: THD %0.3f %%  fundamental %0.4f | 16 bit: THD %0.3f %%  fundamental %0.4f",
             t24, f24, t16, f16);
    d = t24 - t16; if (d < 0) d = -d;
    check(f24 > 0.485 && f24 < 0.515, "24-bit fundamental");
    check(f16 > 0.485 && f16 < 0.515, "16-bit fundamental");
    check(t24 < 0.5, "24-bit THD");
    check(t16 < 0.5, "16-bit THD");
    check(d < 0.05, "THD independent of the input width");
    check(s24 + s16 == 0, "no shoot-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200 * 2048) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
