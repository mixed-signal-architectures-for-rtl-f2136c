// tb_mac_unit: random products and accumulation runs of random length,
// checked against a 64-bit integer model of the accumulator.
module tb_mac_unit;
  import amp_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  sample_t a = '0;
  coef_t   b = '0;
  acc_t    acc;
  always #5 clk = ~clk;

  mac_unit dut (.*);

  int checks = 0, failures = 0;
  longint model = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (acc != 0) begin failures++; $display("acc not reset"); end
    for (int run = 0; run < 200; run++) begin
      automatic int len = int'($urandom_range(1, 20));
      for (int k = 0; k < len; k++) begin
        en  = ($urandom_range(0, 4) != 0) || k == 0;
        clr = (k == 0);
        a   = sample_t'($urandom);
        b   = coef_t'($urandom);
        if (run % 7 == 0) begin a = -16'sd32768; b = -12'sd2048; end
        if (en) model = clr ? longint'(a) * longint'(b) : model + longint'(a) * longint'(b);
        @(negedge clk);
        checks++;
        if (longint'(acc) != model) begin
          failures++;
          if (failures < 10) $display("run %0d k %0d acc %0d exp %0d", run, k, acc, model);
        end
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
