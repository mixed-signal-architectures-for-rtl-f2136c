// tb_load_change: sensitivity of distortion to a load change, with and
// without the 1-bit current-sign feedback.
//
// Four amplifiers run side by side on the same 1 kHz, 0.5 full-scale tone:
// feedback correction on (COMP_TICKS = 2, the default) or off
// (COMP_TICKS = 0), each into a 4 ohm and an 8 ohm R-L load. With the
// feedback off the 2-tick dead time distorts every pulse by the body-diode
// error. Checks: with feedback, THD is lower than without it at both loads;
// with feedback, THD changes less between the two loads than without it; the
// bridge never shoots through; the fundamental stays within 3 % of the tone.
// The THD values are of the window-averaged ideal bridge output and are
// printed for reference.
module tb_load_change;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d_fb4, d_fb8, d_ol4, d_ol8;
  real  t_fb4, t_fb8, t_ol4, t_ol8, f_fb4, f_fb8, f_ol4, f_ol8;
  int   s_fb4, s_fb8, s_ol4, s_ol8;

  amp_tone_bench #(.COMP_TICKS(2), .R_LOAD(4.0)) b_fb4 (.clk, .rst_n, .done(d_fb4), .thd(t_fb4), .fund(f_fb4), .shoot_clocks(s_fb4));
  amp_tone_bench #(.COMP_TICKS(2), .R_LOAD(8.0)) b_fb8 (.clk, .rst_n, .done(d_fb8), .thd(t_fb8), .fund(f_fb8), .shoot_clocks(s_fb8));
  amp_tone_bench #(.COMP_TICKS(0), .R_LOAD(4.0)) b_ol4 (.clk, .rst_n, .done(d_ol4), .thd(t_ol4), .fund(f_ol4), .shoot_clocks(s_ol4));
  amp_tone_bench #(.COMP_TICKS(0), .R_LOAD(8.0)) b_ol8 (.clk, .rst_n, .done(d_ol8), .thd(t_ol8), .fund(f_ol8), .shoot_clocks(s_ol8));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    real dfb, dol;
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (d_fb4 && d_fb8 && d_ol4 && d_ol8);
    $display("THD %%: feedback 4ohm %0.3f  8ohm %0.3f | no feedback 4ohm %0.3f  8ohm %0.3f",
             t_fb4, t_fb8, t_ol4, t_ol8);
    $display("fundamental: %0.4f %0.4f %0.4f %0.4f", f_fb4, f_fb8, f_ol4, f_ol8);
    dfb = t_fb8 - t_fb4; if (dfb < 0) dfb = -dfb;
    dol = t_ol8 - t_ol4; if (dol < 0) dol = -dol;
    check(t_fb4 < t_ol4, "feedback lowers THD at 4 ohm");
    check(t_fb8 < t_ol8, "feedback lowers THD at 8 ohm");
    check(dfb < dol, "feedback reduces the THD change with the load");
    check(s_fb4 + s_fb8 + s_ol4 + s_ol8 == 0, "no shoot-through");
    check(f_fb4 > 0.485 && f_fb4 < 0.515 && f_fb8 > 0.485 && f_fb8 < 0.515, "gain with feedback");
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
