// tb_pwm2_modulator: sweeps the carrier with random (start, width) words and
// checks the registered output against start <= cnt < start+width, and that
// 'en' low forces the output low. Also checks the pulse length per period.
module tb_pwm2_modulator;
  logic clk = 0, rst_n = 0, en = 0, pwm;
  logic [6:0] cnt = '0;
  logic [7:0] start = '0, width = '0;
  always #5 clk = ~clk;

  pwm2_modulator #(.CNT_W(7)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int per = 0; per < 300; per++) begin
      automatic int hi_cnt = 0, exp_len;
      en    = (per % 5) != 4;
      start = 8'($urandom_range(0, 8));
      width = (per % 10 == 3) ? 8'd0 : (per % 10 == 6) ? 8'd128 : 8'($urandom_range(0, 128));
      for (int t = 0; t < 128; t++) begin
        bit exp;
        cnt = 7'(t);
        exp = en && (t >= start) && (t < start + width);
        @(negedge clk);
        checks++;
        if (pwm != exp) begin
          failures++;
          if (failures < 10) $display("per %0d t %0d start %0d width %0d pwm %0d", per, t, start, width, pwm);
        end
        hi_cnt += pwm;
      end
      exp_len = !en ? 0 : (start + width > 128) ? 128 - start : width;
      checks++;
      if (hi_cnt != exp_len) begin failures++; $display("per %0d length %0d exp %0d", per, hi_cnt, exp_len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
