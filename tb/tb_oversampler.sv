// tb_oversampler: checks the x16 polyphase interpolator against a direct
// zero-stuffing model.
//
// The reference inserts a zero after every sample and convolves with the full
// impulse response of each x2 stage (written out here as the complete filters,
// not as the polyphase program), rounding and saturating after each stage as
// the hardware does. Every output must match bit for bit. The test also checks
// the frame time (the sequencer is busy for 98 clocks per input sample: 97 MAC cycles and one store), that 16
// outputs appear per input, and that the input is refused while the output
// FIFO lacks room for a whole frame. A second instance built for 24-bit
// samples (PCM_W = 24) runs in lockstep on the same samples with a random low
// byte appended; it must accept and deliver on the same cycles and match its
// own 24-bit reference bit for bit.
module tb_oversampler;
  import amp_pkg::*;

  localparam int NIN = 48;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, frame_busy;
  sample_t in_data, out_data;
  logic in_ready24, out_valid24, frame_busy24;
  logic signed [23:0] in_data24, out_data24;

  always #5 clk = ~clk;

  oversampler dut (.*);
  oversampler #(.PCM_W(24)) dut24 (
    .clk, .rst_n, .in_valid, .in_ready(in_ready24), .in_data(in_data24),
    .out_valid(out_valid24), .out_ready, .out_data(out_data24),
    .frame_busy(frame_busy24)
  );

  int checks = 0, failures = 0;

  // full impulse responses of the four stages
  int h1 [33] = '{0,-4,0,10,0,-19,0,35,0,-61,0,106,0,-202,0,647,1024,647,0,-202,0,106,0,-61,0,35,0,-19,0,10,0,-4,0};
  int h2 [12] = '{10,18,-65,-111,279,892,892,279,-111,-65,18,10};
  int h3 [6]  = '{-90,178,936,936,178,-90};
  int h4 [4]  = '{243,781,781,243};

  int x0 [NIN];
  int x24 [NIN];
  int y  [NIN*16];
  int y24 [NIN*16];
  int stg_in  [NIN*16];
  int stg_out [NIN*16];

  function automatic int rnd_sat(longint v, longint lim);
    longint r = (v + 512) >>> 10;
    if (r > lim - 1) r = lim - 1;
    if (r < -lim) r = -lim;
    return int'(r);
  endfunction

  task automatic run_stage(int len_in, int sel, longint lim);
    for (int k = 0; k < 2*len_in; k++) begin
      longint s = 0;
      int taps = (sel == 1) ? 33 : (sel == 2) ? 12 : (sel == 3) ? 6 : 4;
      for (int i = 0; i < taps; i++) begin
        int n = k - i;
        int hv = (sel == 1) ? h1[i] : (sel == 2) ? h2[i] : (sel == 3) ? h3[i] : h4[i];
        if (n >= 0 && (n % 2) == 0) s += longint'(hv) * stg_in[n/2];
      end
      stg_out[k] = rnd_sat(s, lim);
    end
    for (int k = 0; k < 2*len_in; k++) stg_in[k] = stg_out[k];
  endtask

  initial begin
    // stimulus: a sine-like ramp mix plus random samples, some at full scale
    for (int i = 0; i < NIN; i++) begin
      if (i < 16)      x0[i] = (i % 2) ? 30000 : -30000;   // exercises saturation
      else if (i < 32) x0[i] = int'($urandom_range(0, 40000)) - 20000;
      else             x0[i] = (i - 40) * 3000;
    end
    for (int i = 0; i < NIN; i++) x24[i] = x0[i] * 256 + int'($urandom_range(0, 255));
    for (int i = 0; i < NIN; i++) stg_in[i] = x0[i];
    for (int s = 1; s <= 4; s++) run_stage(NIN << (s-1), s, 32768);
    for (int k = 0; k < NIN*16; k++) y[k] = stg_in[k];
    for (int i = 0; i < NIN; i++) stg_in[i] = x24[i];
    for (int s = 1; s <= 4; s++) run_stage(NIN << (s-1), s, 8388608);
    for (int k = 0; k < NIN*16; k++) y24[k] = stg_in[k];
  end

  // collect outputs
  int nout = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (int'(out_data) != y[nout]) begin
      failures++;
      if (failures < 10) $display("mismatch out %0d: got %0d exp %0d", nout, out_data, y[nout]);
    end
    checks++;
    if (!out_valid24 || int'(out_data24) != y24[nout]) begin
      failures++;
      if (failures < 10) $display("24-bit mismatch out %0d: got %0d exp %0d", nout, out_data24, y24[nout]);
    end
    nout++;
  end

  // both widths keep the same handshake timing
  int hs_errors = 0;
  always @(posedge clk) if (rst_n && (in_ready24 != in_ready || out_valid24 != out_valid)) hs_errors++;

  // frame timing
  int t_start, frame_len;
  logic busy_q = 0;
  always @(posedge clk) begin
    busy_q <= frame_busy;
    if (frame_busy && !busy_q) t_start = $time / 10;
    if (!frame_busy && busy_q) frame_len = $time / 10 - t_start;
  end

  initial begin
    in_valid = 0; in_data = '0; in_data24 = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // the output is not drained at first: only two frames fit in the FIFO
    for (int i = 0; i < NIN; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = sample_t'(x0[i]);
      in_data24 = 24'(x24[i]);
      if (i == 2) begin
        repeat (400) @(negedge clk);
        checks++;
        if (in_ready) begin failures++; $display("in_ready high with full FIFO"); end
        checks++;
        if (frame_len != 98) begin failures++; $display("frame length %0d", frame_len); end
        out_ready = 1;
      end
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    out_ready = 1;
    repeat (2000) @(posedge clk);
    checks++;
    if (nout != NIN*16) begin failures++; $display("got %0d outputs", nout); end
    checks++;
    if (hs_errors != 0) begin failures++; $display("24-bit handshake differs on %0d cycles", hs_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
