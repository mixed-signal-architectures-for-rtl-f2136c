// pwm3_modulator: 3-level (ternary) PWM modulator for a full bridge.
//
// A free-running sawtooth counter of CNT_W bits defines the carrier period,
// 2^CNT_W clock ticks (128 ticks for p = 7, so the tick is the minimum pulse
// time T_min = 1/(M*FIN*2^p)). It is built from two 2-state modulators sharing
// the counter: one drives leg A for positive samples, the other drives leg B
// for negative samples, and the sign of the current word enables exactly one
// of them. A zero word enables neither, so a silent input causes no switching
// at all (both legs stay low: the zero level of the bridge).
//
// The next word (start, width, sign) is taken from the 'word_*' inputs when
// 'word_valid' pulses and is applied from the next carrier period on: it is
// copied into the active register on the last tick of each period. If no new
// word arrived during a period the active word is set to zero ('starved' is
// then high for one clock). 'period_start' pulses on tick 0 of every period
// and is used to pull the next sample through the signal chain.
//
// Outputs 'leg_a'/'leg_b' are the leg commands (1 = leg at the supply, 0 = leg
// at ground), registered, one clock after the counter.
//
// From the published design: 3-level PWM made of two 2-state modulators selected by the sample
// sign. This design's choices: the word handshake and the zero word on
// starvation.
module pwm3_modulator #(
  parameter int unsigned CNT_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             word_valid,
  input  logic [CNT_W:0]   word_start,
  input  logic [CNT_W:0]   word_width,
  input  logic             word_neg,
  output logic             period_start,
  output logic             starved,
  output logic [CNT_W-1:0] cnt,
  output logic             leg_a,
  output logic             leg_b
);

  logic [CNT_W:0] nxt_start, nxt_width, act_start, act_width;
  logic           nxt_neg, act_neg, nxt_full;
  logic           last_tick;

  assign last_tick    = (cnt == {CNT_W{1'b1}});
  assign period_start = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      nxt_start <= '0;
      nxt_width <= '0;
      nxt_neg   <= 1'b0;
      nxt_full  <= 1'b0;
      act_start <= '0;
      act_width <= '0;
      act_neg   <= 1'b0;
      starved   <= 1'b0;
    end else begin
      cnt     <= cnt + 1'b1;
      starved <= 1'b0;
      if (word_valid) begin
        nxt_start <= word_start;
        nxt_width <= word_width;
        nxt_neg   <= word_neg;
        nxt_full  <= 1'b1;
      end
      if (last_tick) begin
        nxt_full <= 1'b0;
        if (nxt_full) begin
          act_start <= nxt_start;
          act_width <= nxt_width;
          act_neg   <= nxt_neg;
        end else begin
          act_width <= '0;
          starved   <= 1'b1;
        end
      end
    end
  end

  pwm2_modulator #(.CNT_W(CNT_W)) u_pos (
    .clk, .rst_n,
    .en   (!act_neg && act_width != '0),
    .cnt  (cnt),
    .start(act_start),
    .width(act_width),
    .pwm  (leg_a)
  );

  pwm2_modulator #(.CNT_W(CNT_W)) u_neg (
    .clk, .rst_n,
    .en   (act_neg && act_width != '0),
    .cnt  (cnt),
    .start(act_start),
    .width(act_width),
    .pwm  (leg_b)
  );

  // Ternary output: the two legs are never commanded high together.
  a_ternary: assert property (@(posedge clk) disable iff (!rst_n) !(leg_a && leg_b));

endmodule
