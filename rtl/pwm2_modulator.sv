// pwm2_modulator: 2-state PWM modulator.
//
// Compares the digital sawtooth carrier 'cnt' (0 .. 2^CNT_W - 1, one step per
// clock) with the PWM word. The word is given as a pulse start and a pulse
// width in clock ticks, so that a time guard can delay the pulse from the
// start of the carrier period: the output is high for
//     start <= cnt < start + width.
// With start = 0 this is the classic trailing-edge comparison cnt < width.
// 'en' low forces the output low (used by the 3-level modulator to enable only
// one of its two 2-state modulators). The output is registered: it follows
// the counter by one clock.
//
// From the published design: comparison of each noise-shaped word with a digital sawtooth.
// This design's choice: the start/width form of the word.
module pwm2_modulator #(
  parameter int unsigned CNT_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [CNT_W-1:0] cnt,
  input  logic [CNT_W:0]   start,
  input  logic [CNT_W:0]   width,
  output logic             pwm
);

  logic [CNT_W+1:0] stop;
  logic             hit;

  always_comb begin
    stop = {1'b0, start} + {1'b0, width};
    hit  = ({2'b00, cnt} >= {1'b0, start}) && ({2'b00, cnt} < stop);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= 1'b0;
    else        pwm <= en && hit;
  end

endmodule
