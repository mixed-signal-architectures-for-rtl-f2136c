// tb_pwm3_modulator: sends one random word per carrier period and checks,
// period by period, that the word sent in period k appears in period k+1 on
// the leg chosen by its sign, with the right start tick and width, while the
// other leg stays low; zero words give no pulse at all. A period with no
// new word must raise 'starved' and produce no pulse. The carrier period
// must be 128 clocks.
module tb_pwm3_modulator;
  logic clk = 0, rst_n = 0;
  logic word_valid = 0, word_neg = 0;
  logic [7:0] word_start = '0, word_width = '0;
  logic period_start, starved, leg_a, leg_b;
  logic [6:0] cnt;
  always #5 clk = ~clk;

  pwm3_modulator #(.CNT_W(7)) dut (.*);

  int checks = 0, failures = 0;
  int e_start[$], e_width[$], e_neg[$];
  int n_starved = 0;

  // stimulus: word sent at tick 5 of each period (skipped in a few periods)
  int per = 0;
  always @(negedge clk) begin
    word_valid = 0;
    if (rst_n && cnt == 7'd5) begin
      if (per % 17 == 9) begin
        e_start.push_back(0); e_width.push_back(0); e_neg.push_back(0);
      end else begin
        automatic int w = (per % 6 == 2) ? 0 : int'($urandom_range(0, 120));
        automatic int s = int'($urandom_range(0, 6));
        word_valid = 1;
        word_start = 8'(s);
        word_width = 8'(w);
        word_neg   = $urandom_range(0, 1) == 1;
        e_start.push_back(s); e_width.push_back(w); e_neg.push_back(int'(word_neg));
      end
      per++;
    end
  end

  always @(posedge clk) if (starved) n_starved++;

  // monitor: the legs lag the counter by one clock, so the leg value seen
  // while the counter shows c belongs to carrier tick c-1.
  int lp = -1, a_first, a_len, b_len, last_ps = -1, cyc = 0;
  always @(negedge clk) if (rst_n) begin
    logic [6:0] tick;
    cyc++;
    if (period_start) begin
      if (last_ps >= 0) begin
        checks++;
        if (cyc - last_ps != 128) begin failures++; $display("period length %0d", cyc - last_ps); end
      end
      last_ps = cyc;
    end
    tick = cnt - 7'd1;
    if (tick == 7'd0) begin
      if (lp >= 1) begin
        int s, w, ng;
        s = e_start.pop_front(); w = e_width.pop_front(); ng = e_neg.pop_front();
        checks++;
        if (ng ? (b_len != w || a_len != 0) : (a_len != w || b_len != 0)) begin
          failures++;
          if (failures < 10) $display("period %0d: neg %0d w %0d got a %0d b %0d", lp, ng, w, a_len, b_len);
        end
        if (w != 0) begin
          checks++;
          if (a_first != s) begin failures++; $display("period %0d start %0d exp %0d", lp, a_first, s); end
        end
      end
      lp++;
      a_first = -1; a_len = 0; b_len = 0;
    end
    if ((leg_a || leg_b) && a_first < 0) a_first = int'(tick);
    a_len += int'(leg_a);
    b_len += int'(leg_b);
    checks++;
    if (leg_a && leg_b) failures++;
    if (lp == 150) begin
      checks++;
      if (n_starved < 5) begin failures++; $display("starved seen %0d times", n_starved); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
