// time_guard: PWM word correction with time guards and 1-bit current-sign
// feedback (the dead time compensator of the amplifier).
//
// Input is the signed P_BITS-bit noise-shaped word y. Its nominal pulse width
// is 2*|y| ticks of the 2^P_BITS-tick carrier period (|y| = 2^(P_BITS-1) is
// a full period); the sign selects the bridge leg. The word is then corrected:
//
//  * feedback: the sign of the load current, 'i_pos' (1 = current flows out
//    of leg A into the load), is re-synchronised and sampled once per word.
//    During the dead time of a leg the bridge output is set by the body
//    diodes, which shortens the pulse when the current flows in the pulse's
//    own direction and lengthens it otherwise. The width is therefore
//    extended by COMP_TICKS when current and pulse have the same direction and
//    shortened by COMP_TICKS when they are opposite;
//  * time guards: every pulse starts TG_TICKS after the start of the period
//    and ends at least TG_TICKS before its end, so the width is limited to
//    PERIOD - 2*TG_TICKS, and a non-zero pulse is never shorter than TG_TICKS.
//    A zero word stays zero: no pulse, no switching.
//
// Interface: 'in_valid' pulse with 'in_word'; one clock later 'out_valid'
// pulses with the pulse start, width (ticks) and the sign. Status bits of the
// last word: 'clamp_lo' / 'clamp_hi' (a guard limit was applied) and
// 'comp_ext' / 'comp_cut' (the feedback lengthened / shortened the pulse).
// 'out_start' is the constant TG_TICKS in this design, since every pulse
// starts at the guard; it is still passed per word so that another pulse
// placement (centred, for instance) would change only this block.
//
// From the published design: guard intervals at the beginning and end of each PWM word
// (tg = 30 ns, about 3 ticks of 11 ns), and an inserted time value changed
// according to the sign of the load current, with 10 ns correction
// resolution (one tick here). This design's choices: the mapping of the
// word to a width, the min/max clamping rule, the +/-COMP_TICKS correction
// and the once-per-word sampling.
module time_guard
  import amp_pkg::*;
#(
  parameter int unsigned CNT_W      = P_BITS,
  parameter int unsigned TG_TICKS   = 3,
  parameter int unsigned COMP_TICKS = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    i_pos,       // asynchronous current sign
  input  logic                    in_valid,
  input  logic signed [CNT_W-1:0] in_word,
  output logic                    out_valid,
  output logic [CNT_W:0]          out_start,
  output logic [CNT_W:0]          out_width,
  output logic                    out_neg,
  output logic                    clamp_lo,
  output logic                    clamp_hi,
  output logic                    comp_ext,
  output logic                    comp_cut
);

  localparam int unsigned PERIOD = 1 << CNT_W;
  localparam int          W_MAX  = PERIOD - 2*TG_TICKS;
  localparam int          W_MIN  = TG_TICKS;

  logic [1:0] sync;
  logic       neg, same_dir, zero, lo, hi;
  int         mag, w, wc, wf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[0], i_pos};
  end

  always_comb begin
    neg      = in_word[CNT_W-1];
    mag      = neg ? -int'(in_word) : int'(in_word);
    w        = 2 * mag;
    zero     = (w == 0);
    same_dir = (neg != sync[1]);                 // leg A & positive, or leg B & negative
    wc       = same_dir ? w + int'(COMP_TICKS) : w - int'(COMP_TICKS);
    lo       = !zero && (wc < W_MIN);
    hi       = !zero && (wc > W_MAX);
    wf       = zero ? 0 : lo ? W_MIN : hi ? W_MAX : wc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_start <= '0;
      out_width <= '0;
      out_neg   <= 1'b0;
      clamp_lo  <= 1'b0;
      clamp_hi  <= 1'b0;
      comp_ext  <= 1'b0;
      comp_cut  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_start <= (CNT_W+1)'(TG_TICKS);
        out_width <= (CNT_W+1)'(wf);
        out_neg   <= neg;
        clamp_lo  <= lo;
        clamp_hi  <= hi;
        comp_ext  <= !zero && same_dir;
        comp_cut  <= !zero && !same_dir;
      end
    end
  end

endmodule
