// digital_amp_top: digital part of a PCM-input class-D power amplifier
// (open-loop chain with 1-bit current-sign feedback).
//
// Signal chain, all in one clock domain running at 2^P_BITS * M * FIN
// (90.3168 MHz for 44.1 kS/s CD audio, 196.608 MHz for 96 kS/s DVD audio,
// i.e. 2048 clocks per input sample). The PCM width n is PCM_W: 16 by
// default, up to 24; the oversampler and the estimator work at that width
// and the noise shaper takes it down to 7 bits:
//
//   PCM n bit @FIN -> oversampler (x16, 4-stage polyphase FIR, one MAC)
//     -> cross_point_dc (natural-PWM delta compensation)
//     -> noise_shaper (n -> 7 bits, 5th order)
//     -> time_guard (guard intervals, current-sign width correction)
//     -> pwm3_modulator (3-level PWM, 128-tick carrier)
//     -> 2 x deadtime_gen -> gate commands of the H-bridge
//
// The PWM carrier paces the chain: at the start of each carrier period one
// oversampled sample is taken from the oversampler's FIFO and pushed through
// the estimator, the noise shaper and the word correction (one clock each);
// the resulting word is applied in the following carrier period. The
// oversampler refills its FIFO by asking for a new PCM sample on 'pcm_ready'
// whenever it has room for 16 more outputs, which at steady state is once
// every 16 carrier periods (2048 clocks): the PCM source must deliver a
// sample per request ('pcm_valid' with 'pcm_data'), and if none is ready in
// time the chain plays zeros ('status.underrun').
//
// 'i_pos' is the 1-bit sign of the load current from the power stage
// (asynchronous, 1 = current flowing out of leg A). 'gates' drives the four
// switches through their gate drivers. 'status' carries one-clock event
// pulses (see amp_pkg::amp_status_t). Latency from a PCM sample to its first
// PWM pulse is about 2 frames of the oversampler's FIFO plus two carrier
// periods, fixed by the FIFO fill.
//
// From the published design: the chain and its order, M = 16, p = 7, 5th-order shaping,
// delta-compensated NPWM, 3-level PWM, time guards and 1-bit feedback.
// This design's choices: the single clock, the pacing and handshakes, and the
// tick values of the guard, compensation and dead time parameters.
module digital_amp_top
  import amp_pkg::*;
#(
  parameter int unsigned TG_TICKS   = 3,   // time guard, ~33 ns (document: 30 ns)
  parameter int unsigned COMP_TICKS = 2,   // feedback correction, = dead time
  parameter int unsigned DT_TICKS   = 2,   // dead time per transition, ~22 ns
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned PCM_W      = DATA_W  // PCM sample width n, 16..24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pcm_valid,
  output logic        pcm_ready,
  input  logic signed [PCM_W-1:0] pcm_data,
  input  logic        i_pos,
  output gates_t      gates,
  output amp_status_t status
);

  localparam int unsigned CNT_W = P_BITS;

  // oversampler
  typedef logic signed [PCM_W-1:0] smp_t;

  logic    os_valid, os_ready, os_busy;
  smp_t    os_data;

  oversampler #(.FIFO_DEPTH(FIFO_DEPTH), .PCM_W(PCM_W)) u_os (
    .clk, .rst_n,
    .in_valid  (pcm_valid),
    .in_ready  (pcm_ready),
    .in_data   (pcm_data),
    .out_valid (os_valid),
    .out_ready (os_ready),
    .out_data  (os_data),
    .frame_busy(os_busy)
  );

  // one sample per carrier period
  logic    period_start, starved;
  logic    feed_valid;
  smp_t    feed_data;
  always_comb begin
    os_ready   = period_start;
    feed_valid = period_start;
    feed_data  = os_valid ? os_data : '0;
  end

  logic    cp_valid;
  smp_t    cp_data;
  cross_point_dc #(.DW(PCM_W)) u_cp (
    .clk, .rst_n,
    .in_valid (feed_valid),
    .in_data  (feed_data),
    .out_valid(cp_valid),
    .out_data (cp_data)
  );

  logic                    ns_valid, ns_ovl;
  logic signed [P_BITS-1:0] ns_data;
  noise_shaper #(.IN_W(PCM_W)) u_ns (
    .clk, .rst_n,
    .in_valid (cp_valid),
    .in_data  (cp_data),
    .out_valid(ns_valid),
    .out_data (ns_data),
    .overload (ns_ovl)
  );

  logic           tg_valid, tg_neg, tg_lo, tg_hi, tg_ext, tg_cut;
  logic [CNT_W:0] tg_start, tg_width;
  time_guard #(.CNT_W(CNT_W), .TG_TICKS(TG_TICKS), .COMP_TICKS(COMP_TICKS)) u_tg (
    .clk, .rst_n,
    .i_pos,
    .in_valid (ns_valid),
    .in_word  (ns_data),
    .out_valid(tg_valid),
    .out_start(tg_start),
    .out_width(tg_width),
    .out_neg  (tg_neg),
    .clamp_lo (tg_lo),
    .clamp_hi (tg_hi),
    .comp_ext (tg_ext),
    .comp_cut (tg_cut)
  );

  logic [CNT_W-1:0] cnt;
  logic             leg_a, leg_b;
  pwm3_modulator #(.CNT_W(CNT_W)) u_pwm (
    .clk, .rst_n,
    .word_valid  (tg_valid),
    .word_start  (tg_start),
    .word_width  (tg_width),
    .word_neg    (tg_neg),
    .period_start(period_start),
    .starved     (starved),
    .cnt         (cnt),
    .leg_a       (leg_a),
    .leg_b       (leg_b)
  );

  deadtime_gen #(.DT_TICKS(DT_TICKS)) u_dt_a (
    .clk, .rst_n, .cmd(leg_a), .hs_on(gates.a_hs), .ls_on(gates.a_ls)
  );
  deadtime_gen #(.DT_TICKS(DT_TICKS)) u_dt_b (
    .clk, .rst_n, .cmd(leg_b), .hs_on(gates.b_hs), .ls_on(gates.b_ls)
  );

  always_comb begin
    status.underrun    = period_start && !os_valid;
    status.ns_overload = ns_valid && ns_ovl;
    status.clamp_lo    = tg_valid && tg_lo;
    status.clamp_hi    = tg_valid && tg_hi;
    status.comp_ext    = tg_valid && tg_ext;
    status.comp_cut    = tg_valid && tg_cut;
  end

endmodule
