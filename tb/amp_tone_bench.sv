// amp_tone_bench: testbench helper. One amplifier (digital_amp_top with the
// given feedback correction COMP_TICKS and sample width PCM_W) driving the
// behavioural bridge into a series R-L load of R_LOAD ohms, fed with a 1 kHz
// tone of AMP full scale at FIN samples per second (the clock is 2048*FIN).
// The bridge output is averaged over each input-sample period (2048 clocks);
// after SKIP samples of settling, NA = FIN/100 samples (ten tone periods)
// are analysed by DFT. 'done' rises when 'thd' (harmonics 2..9, percent) and
// 'fund' (fundamental, fraction of full scale) are valid.
module amp_tone_bench
  import amp_pkg::*;
#(
  parameter int  COMP_TICKS = 2,
  parameter real R_LOAD     = 4.0,
  parameter real AMP        = 0.5,
  parameter int  PCM_W      = 16,
  parameter int  FIN        = 44100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output real  thd,
  output real  fund,
  output int   shoot_clocks
);

  localparam int  SPP  = 2048;
  localparam int  NA   = FIN / 100;
  localparam int  SKIP = 64;
  localparam real PI   = 3.14159265358979;

  logic pcm_valid, pcm_ready, i_pos, shoot;
  logic signed [PCM_W-1:0] pcm_data;
  gates_t gates;
  amp_status_t status;
  int level;

  digital_amp_top #(.COMP_TICKS(COMP_TICKS), .PCM_W(PCM_W)) u_amp (
    .clk, .rst_n, .pcm_valid, .pcm_ready, .pcm_data, .i_pos, .gates, .status
  );
  hbridge_model #(.R(R_LOAD), .TCLK(1.0 / (2048.0 * FIN))) u_bridge (.clk, .gates, .i_pos, .level, .shoot);

  int  n_pcm = 0, cyc = 0, win = 0, acc_lvl = 0;
  real avg [SKIP + NA + 1];

  assign pcm_valid = rst_n;
  assign pcm_data  = PCM_W'(longint'(AMP * (2.0 ** (PCM_W - 1) - 1.0)
                                      * $sin(2.0 * PI * 1000.0 * n_pcm / FIN)));

  initial begin
    done = 1'b0; thd = 0.0; fund = 0.0; shoot_clocks = 0;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pcm_valid && pcm_ready) n_pcm <= n_pcm + 1;
    acc_lvl += level;
    shoot_clocks += int'(shoot);
    if (cyc % SPP == 0) begin
      if (win <= SKIP + NA) avg[win] = real'(acc_lvl) / SPP;
      win++;
      acc_lvl = 0;
      if (win == SKIP + NA + 1) analyse();
    end
  end

  function automatic void analyse();
    real re, im, mag, h2;
    h2 = 0.0;
    for (int h = 1; h <= 9; h++) begin
      re = 0.0; im = 0.0;
      for (int m = 0; m < NA; m++) begin
        re += avg[SKIP + m] * $cos(2.0 * PI * h * m * 1000.0 / FIN);
        im += avg[SKIP + m] * $sin(2.0 * PI * h * m * 1000.0 / FIN);
      end
      mag = 2.0 * $sqrt(re * re + im * im) / NA;
      if (h == 1) fund = mag;
      else        h2 += mag * mag;
    end
    thd  = 100.0 * $sqrt(h2) / fund;
    done = 1'b1;
  endfunction

endmodule
