// tb_noise_shaper: checks the 5th-order error-feedback requantizer.
//
// A behavioural model of the loop (written as the difference equation
// y = x - (1 - z^-1)^5 e, with e the rounding residue) must agree word for
// word. Independently of the model: for constant inputs the mean of the 7-bit
// output must equal the input to within 1/50 of an output LSB (the noise
// shaper has unity signal gain and no DC error), a full-scale input must
// raise 'overload', and the output must stay inside the 7-bit range.
module tb_noise_shaper;
  import amp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, overload;
  sample_t in_data = '0;
  logic signed [6:0] out_data;
  always #5 clk = ~clk;

  noise_shaper dut (.*);

  int checks = 0, failures = 0, n_ovl = 0;
  int e1, e2, e3, e4, e5;

  task automatic push(input int x, output int y_got, output int y_exp);
    int u, q, r;
    u = x + 5*e1 - 10*e2 + 10*e3 - 5*e4 + e5;
    q = (u + 256) >>> 9;
    if (q > 63) q = 63;
    if (q < -64) q = -64;
    r = u - q * 512;
    if (r > 512) r = 512;
    if (r < -512) r = -512;
    e5 = e4; e4 = e3; e3 = e2; e2 = e1; e1 = r;
    y_exp = q;
    @(negedge clk);
    in_valid = 1; in_data = sample_t'(x);
    @(negedge clk);
    in_valid = 0;
    y_got = int'(out_data);
    if (overload) n_ovl++;
  endtask

  initial begin
    int yg, ye;
    e1 = 0; e2 = 0; e3 = 0; e4 = 0; e5 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // constant inputs: mean check
    for (int c = 0; c < 5; c++) begin
      automatic int x = (c == 0) ? 1000 : (c == 1) ? -7777 : (c == 2) ? 123 : (c == 3) ? 20000 : -15000;
      automatic longint sum = 0;
      for (int k = 0; k < 2048; k++) begin
        push(x, yg, ye);
        checks++;
        if (yg != ye) begin failures++; if (failures < 10) $display("c %0d k %0d got %0d exp %0d", c, k, yg, ye); end
        if (k >= 1024) sum += yg;
      end
      checks++;
      begin
        automatic real mean = real'(sum) / 1024.0, want = real'(x) / 512.0;
        if (mean - want > 0.02 || want - mean > 0.02) begin
          failures++; $display("DC %0d: mean %f want %f", x, mean, want);
        end
      end
    end
    // sine and full-scale segments
    for (int k = 0; k < 3000; k++) begin
      automatic int x = (k < 2000) ? int'(20000.0 * $sin(2.0 * 3.14159265 * k / 160.0))
                         : ((k / 50) % 2 ? 32767 : -32768);
      push(x, yg, ye);
      checks++;
      if (yg != ye) begin failures++; if (failures < 10) $display("k %0d got %0d exp %0d", k, yg, ye); end
    end
    checks++;
    if (n_ovl == 0) begin failures++; $display("overload never raised"); end
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
