// tb_deadtime_gen: random leg commands with random hold times, including
// glitches shorter than the dead time. Checks that the two switches never
// conduct together, that after every change of 'cmd' held long enough the
// old switch turns off after one clock and the new one turns on exactly
// DT+1 clocks after the change, and that a steady command gives a steady
// output.
module tb_deadtime_gen;
  localparam int DT = 3;
  logic clk = 0, rst_n = 0, cmd = 0, hs_on, ls_on;
  always #5 clk = ~clk;

  deadtime_gen #(.DT_TICKS(DT)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (!ls_on || hs_on) begin failures++; $display("reset state wrong"); end
    for (int k = 0; k < 500; k++) begin
      automatic int hold = (k % 5 == 0) ? int'($urandom_range(1, DT)) : int'($urandom_range(DT + 2, 20));
      automatic bit nc = !cmd;
      cmd = nc;
      for (int t = 1; t <= hold; t++) begin
        @(negedge clk);
        checks++;
        if (hs_on && ls_on) begin failures++; $display("shoot-through"); end
        if (hold > DT + 1) begin
          // t clocks after the change
          automatic bit exp_hs = (t > DT) ? nc : 1'b0;
          automatic bit exp_ls = (t > DT) ? !nc : 1'b0;
          checks++;
          if (hs_on != exp_hs || ls_on != exp_ls) begin
            failures++;
            if (failures < 10) $display("k %0d t %0d cmd %0d hs %0d ls %0d", k, t, nc, hs_on, ls_on);
          end
        end
      end
      if (hold <= DT + 1) begin
        // the short pulse is withdrawn: the leg returns to its old state
        cmd = !nc;
        repeat (DT + 2) @(negedge clk);
        checks++;
        if (hs_on != !nc || ls_on != nc) begin failures++; $display("did not settle after glitch"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
