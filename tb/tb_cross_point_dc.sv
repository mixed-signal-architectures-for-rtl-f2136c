// tb_cross_point_dc: checks the delta-compensation estimator.
//
// Two checks per sample: the exact fixed-point result y = x + x*D (D =
// |x[n+1]| - |x[n]|, rounded, saturated), and, independently, that the result
// is within the first-order error of the exact linear-interpolation crossing
// |x|/(1 - D) (the error of the estimate is |x|*D^2/(1-D)). The one-sample
// latency is checked through the pairing of inputs and outputs.
module tb_cross_point_dc;
  import amp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_data = '0, out_data;
  always #5 clk = ~clk;

  cross_point_dc dut (.*);

  int checks = 0, failures = 0;
  int xs [400];

  initial begin
    // a slow sine plus some random steps
    for (int i = 0; i < 400; i++) begin
      if (i < 300) xs[i] = int'(28000.0 * $sin(2.0 * 3.14159265 * i / 37.0));
      else         xs[i] = int'($urandom_range(0, 65535)) - 32768;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = sample_t'(xs[i]);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid at %0d", i); end
      if (i > 0) begin
        automatic int x = xs[i-1], xn = xs[i];
        automatic int d = (xn < 0 ? -xn : xn) - (x < 0 ? -x : x);
        automatic longint p = longint'(x) * d;
        automatic longint y = x + ((p + 16384) >>> 15);
        real    dr, li, est, tol;
        if (y > 32767) y = 32767;
        if (y < -32768) y = -32768;
        checks++;
        if (longint'(out_data) != y) begin
          failures++;
          if (failures < 10) $display("i %0d x %0d xn %0d got %0d exp %0d", i, x, xn, out_data, y);
        end
        // compare with the linear-interpolation crossing for small steps
        dr = real'(d) / 32768.0;
        if (i < 300 && dr < 0.5 && dr > -0.5) begin
          li  = real'(x) / (1.0 - dr);
          est = real'(out_data);
          tol = (x < 0 ? -x : x) * dr * dr / (1.0 - dr) + 2.0;
          if (tol < 0) tol = -tol;
          checks++;
          if (est - li > tol + 1 || li - est > tol + 1) begin
            failures++;
            $display("i %0d LI %f est %f tol %f", i, li, est, tol);
          end
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("out_valid not a pulse"); end
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
