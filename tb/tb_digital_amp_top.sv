// tb_digital_amp_top: end-to-end test of the amplifier's digital part with
// all parameters at their defaults, driving a behavioural bridge and R-L load
// that returns the current sign.
//
// The PCM source answers every request with the next sample of a test signal
// made of four parts: a 0.6 full-scale sine, a near full-scale square wave
// (guard clamping at the top, noise shaper overload), a sine far below one
// PWM step (minimum-width clamping, zero words) and silence. Checks:
//  * the bridge output, averaged over each input-sample period (2048 clocks),
//    follows the sine to within a tolerance once the chain latency, found by
//    a search, is taken out;
//  * one PCM sample is requested every 2048 clocks (16 carrier periods of 128
//    clocks);
//  * no leg ever has both switches on;
//  * every mechanism happened at least once: FIFO underrun at start-up,
//    natural-PWM correction, noise shaper overload, 3-level pulses of both
//    signs and periods without switching, dead time on both legs, time-guard
//    clamping low and high, and the feedback lengthening and shortening
//    pulses.
module tb_digital_amp_top;
  import amp_pkg::*;

  localparam int SPP   = 2048;   // clocks per input sample
  localparam int N_SIN = 96, N_SQ = 24, N_TINY = 48, N_SIL = 32;
  localparam int NTOT  = N_SIN + N_SQ + N_TINY + N_SIL;
  localparam real PI   = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic pcm_valid, pcm_ready, i_pos, shoot;
  sample_t pcm_data;
  gates_t gates;
  amp_status_t status;
  int level;

  always #5 clk = ~clk;

  digital_amp_top dut (.*);

  hbridge_model u_bridge (.clk, .gates, .i_pos, .level, .shoot);

  int checks = 0, failures = 0;

  // test signal
  int xs [NTOT];
  initial begin
    for (int i = 0; i < NTOT; i++) begin
      if (i < N_SIN)                    xs[i] = int'(0.6 * 32767.0 * $sin(2.0 * PI * i / 32.0));
      else if (i < N_SIN + N_SQ)        xs[i] = ((i / 6) % 2) ? 32500 : -32500;
      else if (i < N_SIN + N_SQ + N_TINY) xs[i] = int'(300.0 * $sin(2.0 * PI * i / 16.0));
      else                              xs[i] = 0;
    end
  end

  // PCM source
  int n_pcm = 0, first_pcm = -1, last_pcm = -1, cyc = 0;
  assign pcm_valid = rst_n;
  assign pcm_data  = sample_t'(n_pcm < NTOT ? xs[n_pcm] : 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pcm_valid && pcm_ready) begin
      n_pcm <= n_pcm + 1;
      if (n_pcm == 8)  first_pcm <= cyc;
      if (n_pcm == 88) last_pcm  <= cyc;
    end
  end

  // output averaged per input-sample period
  real avg [NTOT + 40];
  int  acc_lvl = 0, win = 0;
  always @(posedge clk) if (rst_n) begin
    acc_lvl += level;
    if (cyc % SPP == SPP - 1) begin
      if (win < NTOT + 40) avg[win] = real'(acc_lvl) / SPP;
      win++;
      acc_lvl = 0;
    end
  end

  // mechanism counters
  int n_under = 0, n_ovl = 0, n_lo = 0, n_hi = 0, n_ext = 0, n_cut = 0;
  int n_shoot = 0, n_dta = 0, n_dtb = 0, n_pos = 0, n_neg = 0, n_quiet = 0, n_npwm = 0;
  int trans_in_period = 0;
  logic [3:0] gates_q = '0;
  sample_t cp_raw;
  always @(posedge clk) if (rst_n) begin
    n_under += int'(status.underrun);
    n_ovl   += int'(status.ns_overload);
    n_lo    += int'(status.clamp_lo);
    n_hi    += int'(status.clamp_hi);
    n_ext   += int'(status.comp_ext);
    n_cut   += int'(status.comp_cut);
    n_shoot += int'(shoot);
    n_dta   += int'(!gates.a_hs && !gates.a_ls);
    n_dtb   += int'(!gates.b_hs && !gates.b_ls);
    if (gates.a_hs && !gates_q[3]) n_pos++;
    if (gates.b_hs && !gates_q[1]) n_neg++;
    if (gates != gates_q) trans_in_period++;
    gates_q <= gates;
    if (dut.u_pwm.period_start) begin
      if (trans_in_period == 0 && cyc > 4 * SPP) n_quiet++;
      trans_in_period = 0;
    end
    if (dut.u_cp.in_valid) cp_raw <= dut.u_cp.x_cur;
    if (dut.u_cp.out_valid && dut.u_cp.out_data != cp_raw) n_npwm++;
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    real best_err, best_lag;
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (win == NTOT + 20);

    // latency search on the sine part (skip its first 32 samples)
    best_err = 1.0e9; best_lag = 0.0;
    for (int l16 = 0; l16 < 16 * 24; l16++) begin
      automatic real lag = real'(l16) / 16.0, err = 0.0;
      for (int m = 40; m < N_SIN; m++) begin
        automatic real e = avg[m] - 0.6 * $sin(2.0 * PI * (m - lag) / 32.0);
        if (e < 0) e = -e;
        if (e > err) err = e;
      end
      if (err < best_err) begin best_err = err; best_lag = lag; end
    end
    $display("latency %0.2f samples, max tracking error %0.4f of full scale", best_lag, best_err);
    checks++;
    if (best_err > 0.03) begin failures++; $display("output does not follow the input"); end

    checks++;
    if (last_pcm - first_pcm != 80 * SPP) begin
      failures++; $display("PCM rate: 80 samples in %0d clocks", last_pcm - first_pcm);
    end
    checks++;
    if (n_shoot != 0) begin failures++; $display("shoot-through in %0d clocks", n_shoot); end

    expect_seen("FIFO underrun (start-up)", n_under);
    expect_seen("NPWM delta correction", n_npwm);
    expect_seen("noise shaper overload", n_ovl);
    expect_seen("positive pulses (leg A)", n_pos);
    expect_seen("negative pulses (leg B)", n_neg);
    expect_seen("periods without switching", n_quiet);
    expect_seen("dead time leg A (clocks)", n_dta);
    expect_seen("dead time leg B (clocks)", n_dtb);
    expect_seen("guard clamp, minimum width", n_lo);
    expect_seen("guard clamp, maximum width", n_hi);
    expect_seen("feedback lengthened pulse", n_ext);
    expect_seen("feedback shortened pulse", n_cut);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NTOT + 60) * SPP) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
