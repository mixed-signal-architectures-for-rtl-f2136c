// tb_feedback_power: distortion against output level for the open-loop
// chain and for the chain with the 1-bit current-sign feedback.
//
// Eight amplifiers run side by side into 4 ohm: four tone levels (0.2, 0.4,
// 0.6 and 0.8 of full scale, about 3, 12, 28 and 50 W at the 25 V bridge
// supply of the bridge model), each with the feedback correction off
// (COMP_TICKS = 0, open loop) and on (COMP_TICKS = 2). The 1 kHz tone is
// 16-bit at 44.1 kS/s. Checks: at every level the feedback lowers THD and
// keeps it below 1 %; with feedback, THD does not rise with the level (by
// more than 0.01 %); the fundamental with feedback is within 3 % of the
// level; no shoot-through. The THD values are of the window-averaged ideal
// bridge output and are printed for reference.
module tb_feedback_power;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NL = 4;
  localparam real LVL [NL] = '{0.2, 0.4, 0.6, 0.8};

  logic d_ol [NL], d_fb [NL];
  real  t_ol [NL], t_fb [NL], f_ol [NL], f_fb [NL];
  int   s_ol [NL], s_fb [NL];

  for (genvar g = 0; g < NL; g++) begin : g_lvl
    amp_tone_bench #(.COMP_TICKS(0), .AMP(LVL[g])) b_ol (
      .clk, .rst_n, .done(d_ol[g]), .thd(t_ol[g]), .fund(f_ol[g]), .shoot_clocks(s_ol[g])
    );
    amp_tone_bench #(.COMP_TICKS(2), .AMP(LVL[g])) b_fb (
      .clk, .rst_n, .done(d_fb[g]), .thd(t_fb[g]), .fund(f_fb[g]), .shoot_clocks(s_fb[g])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit all_done();
    for (int l = 0; l < NL; l++) if (!d_ol[l] || !d_fb[l]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    for (int l = 0; l < NL; l++) begin
      $display("level %0.1f (%0.1f W): THD open loop %0.3f %%, with feedback %0.3f %%; fundamental %0.4f / %0.4f",
               LVL[l], (LVL[l] * 25.0) ** 2 / 8.0, t_ol[l], t_fb[l], f_ol[l], f_fb[l]);
      check(t_fb[l] < t_ol[l], $sformatf("feedback lowers THD at level %0.1f", LVL[l]));
      check(t_fb[l] < 1.0, $sformatf("THD with feedback at level %0.1f", LVL[l]));
      if (l > 0)
        check(t_fb[l] <= t_fb[l-1] + 0.01, $sformatf("THD falls with level at %0.1f", LVL[l]));
      check(f_fb[l] > 0.97 * LVL[l] && f_fb[l] < 1.03 * LVL[l],
            $sformatf("fundamental with feedback at level %0.1f", LVL[l]));
      check(s_ol[l] + s_fb[l] == 0, "no shoot-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600 * 2048) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
