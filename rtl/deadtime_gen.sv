// deadtime_gen: dead-time insertion for one half bridge (one leg).
//
// 'cmd' asks for the leg output high (high-side switch on) or low (low-side
// switch on). When 'cmd' changes, the conducting switch is turned off at
// once and the other one is turned on only after DT_TICKS clocks with both
// off, so the complementary P/N MOS pair can never conduct together. If 'cmd'
// returns to its old value during the dead time, the old switch is turned
// back on (the other one never started). Outputs are registered: the leg
// follows 'cmd' one clock later, plus DT_TICKS on each turn-on.
// After reset the leg is low (low side on).
//
// From the published design: dead time intervals inserted when the PWM wave switches, against
// shoot-through between the supplies. This design's choices: the dead time
// as a parameter in clock ticks (default 2 ticks, about 22 ns at 90.3 MHz,
// set against the 20 ns switching delay the document quotes) and the
// turn-off-first rule.
module deadtime_gen #(
  parameter int unsigned DT_TICKS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd,
  output logic hs_on,
  output logic ls_on
);

  localparam int unsigned CW = $clog2(DT_TICKS + 1);

  logic          side;   // switch allowed to conduct: 1 = high side
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      side  <= 1'b0;
      cnt   <= '0;
      hs_on <= 1'b0;
      ls_on <= 1'b0;
    end else if (cmd != side) begin
      hs_on <= 1'b0;
      ls_on <= 1'b0;
      if (cnt == CW'(DT_TICKS - 1)) begin
        side <= cmd;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end else begin
      cnt   <= '0;
      hs_on <= side;
      ls_on <= !side;
    end
  end

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(hs_on && ls_on));

endmodule
