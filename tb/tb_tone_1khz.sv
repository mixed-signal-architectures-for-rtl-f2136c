// tb_tone_1khz: the amplifier's reference measurement condition, a 1 kHz
// tone in 16-bit, 44.1 kS/s PCM, run through the complete digital part at its
// default parameters into the behavioural bridge and 4 ohm R-L load.
//
// The bridge output level (-1/0/+1 per clock) is averaged over each
// input-sample period (2048 clocks), a crude low-pass standing in for the LC
// filter. After settling, ten cycles of the tone (441 samples, an exact
// period) are analysed by DFT: the fundamental amplitude must match the
// programmed amplitude within 2 %, and the total harmonic distortion of
// harmonics 2..9 at the averaged bridge voltage is printed and must be below
// 0.5 %. This measures only the digital modulation with an idealised
// bridge; it is not a model of the analog measurement.
module tb_tone_1khz;
  import amp_pkg::*;

  localparam int  SPP  = 2048;
  localparam int  NA   = 441;               // 10 periods of 1 kHz at 44.1 kS/s
  localparam int  SKIP = 64;                // settling, in samples
  localparam real PI   = 3.14159265358979;
  localparam real AMP  = 0.5;

  logic clk = 0, rst_n = 0;
  logic pcm_valid, pcm_ready, i_pos, shoot;
  sample_t pcm_data;
  gates_t gates;
  amp_status_t status;
  int level;

  always #5 clk = ~clk;

  digital_amp_top dut (.*);
  hbridge_model u_bridge (.clk, .gates, .i_pos, .level, .shoot);

  int checks = 0, failures = 0, n_pcm = 0, cyc = 0, win = 0, acc_lvl = 0, n_shoot = 0;
  real avg [SKIP + NA + 1];

  assign pcm_valid = rst_n;
  assign pcm_data  = sample_t'(int'(AMP * 32767.0 * $sin(2.0 * PI * 1000.0 * n_pcm / 44100.0)));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pcm_valid && pcm_ready) n_pcm <= n_pcm + 1;
    if (rst_n) begin
      acc_lvl += level;
      n_shoot += int'(shoot);
      if (cyc % SPP == SPP - 1) begin
        if (win <= SKIP + NA) avg[win] = real'(acc_lvl) / SPP;
        win++;
        acc_lvl = 0;
      end
    end
  end

  initial begin
    real re [1:9], im [1:9], mag [1:9], thd, h2;
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (win == SKIP + NA + 1);
    for (int h = 1; h <= 9; h++) begin
      re[h] = 0.0; im[h] = 0.0;
      for (int m = 0; m < NA; m++) begin
        re[h] += avg[SKIP + m] * $cos(2.0 * PI * h * m * 1000.0 / 44100.0);
        im[h] += avg[SKIP + m] * $sin(2.0 * PI * h * m * 1000.0 / 44100.0);
      end
      mag[h] = 2.0 * $sqrt(re[h] * re[h] + im[h] * im[h]) / NA;
    end
    h2 = 0.0;
    for (int h = 2; h <= 9; h++) h2 += mag[h] * mag[h];
    thd = 100.0 * $sqrt(h2) / mag[1];
    $display("fundamental %0.4f of full scale (programmed %0.2f), THD(2..9) %0.3f %%", mag[1], AMP, thd);
    checks++;
    if (mag[1] < AMP * 0.98 || mag[1] > AMP * 1.02) begin failures++; $display("gain wrong"); end
    checks++;
    if (thd > 0.5) begin failures++; $display("THD too high"); end
    checks++;
    if (n_shoot != 0) begin failures++; $display("shoot-through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((SKIP + NA + 40) * SPP) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
