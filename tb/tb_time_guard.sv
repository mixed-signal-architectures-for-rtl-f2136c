// tb_time_guard: random and corner-case words with a random current sign.
// The expected start, width and sign are worked out from the rules: nominal
// width 2|y|; +COMP when the current flows in the pulse direction, -COMP
// otherwise; zero stays zero; otherwise clamp to [TG, 128 - 2*TG]. The current
// sign passes a two-flop synchroniser, so it is held for several clocks
// before each word. Status bits are checked too.
module tb_time_guard;
  localparam int TG = 3, COMP = 2;
  logic clk = 0, rst_n = 0, i_pos = 0, in_valid = 0;
  logic signed [6:0] in_word = '0;
  logic out_valid, out_neg, clamp_lo, clamp_hi, comp_ext, comp_cut;
  logic [7:0] out_start, out_width;
  always #5 clk = ~clk;

  time_guard #(.CNT_W(7), .TG_TICKS(TG), .COMP_TICKS(COMP)) dut (.*);

  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0, n_ext = 0, n_cut = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      int y, w, we;
      bit neg, same;
      case (k % 8)
        0: y = 0;
        1: y = 1;
        2: y = -1;
        3: y = 63;
        4: y = -64;
        default: y = int'($urandom_range(0, 127)) - 64;
      endcase
      i_pos = $urandom_range(0, 1) == 1;
      repeat (3) @(negedge clk);
      in_valid = 1; in_word = 7'(y);
      @(negedge clk);
      in_valid = 0;
      neg  = y < 0;
      w    = 2 * (neg ? -y : y);
      same = neg ? !i_pos : i_pos;
      we   = (w == 0) ? 0 : same ? w + COMP : w - COMP;
      if (w != 0 && we < TG) we = TG;
      if (w != 0 && we > 128 - 2*TG) we = 128 - 2*TG;
      checks++;
      if (!out_valid || out_width != 8'(we) || out_start != 8'(TG) || out_neg != neg) begin
        failures++;
        if (failures < 10) $display("y %0d ipos %0d: width %0d exp %0d start %0d neg %0d", y, i_pos, out_width, we, out_start, out_neg);
      end
      checks++;
      if (comp_ext != (w != 0 && same) || comp_cut != (w != 0 && !same)) begin
        failures++; $display("comp flags wrong for y %0d", y);
      end
      n_lo += int'(clamp_lo); n_hi += int'(clamp_hi);
      n_ext += int'(comp_ext); n_cut += int'(comp_cut);
    end
    checks++;
    if (n_lo == 0 || n_hi == 0 || n_ext == 0 || n_cut == 0) begin
      failures++; $display("flags lo %0d hi %0d ext %0d cut %0d", n_lo, n_hi, n_ext, n_cut);
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
