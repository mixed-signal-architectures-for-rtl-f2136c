// amp_pkg: constants and the interpolation coefficient ROM shared by the
// digital audio amplifier.
//
// Number formats:
//   * audio samples are DATA_W = 16-bit signed two's complement, full scale
//     +/-1 (Q1.15), the n = 16 bits of CD audio;
//   * interpolation coefficients are COEF_W = 12-bit signed with COEF_FRAC = 10
//     fractional bits (range +/-2, so that a x2 stage has a pass-band gain of 2
//     split over its two polyphase branches, each branch summing to ~1.0);
//   * the noise-shaped PWM word is P_BITS = 7-bit signed.
//
// Oversampler program: the x16 interpolator is a cascade of four x2 polyphase
// FIR stages of order 32, 11, 5 and 3 (equiripple, pass band 0.4*FIN, stop band
// starting at (stage input rate - 0.4*FIN)). A x2 polyphase stage computes
//   y[2m+p] = sum_j h[2j+p] * x[m-j],    p = 0, 1
// so each (stage, phase) pair is a short list of (coefficient, delay-line index)
// entries. The first stage is a half-band filter: its phase 0 holds only the
// centre tap, so that phase costs one MAC instead of 17. Zero taps are not
// stored at all. Per input sample the program runs
//   1*(1+16) + 2*(6+6) + 4*(3+3) + 8*(2+2) = 97 MAC operations,
// i.e. 4.28 MMAC/s at 44.1 kS/s.
//
// The coefficients were obtained with the Parks-McClellan algorithm for the
// bands above, normalised to a gain of 2 and rounded to 12 bits (the half-band
// centre tap set to exactly 1.0).
package amp_pkg;

  localparam int unsigned DATA_W    = 16;  // n, PCM sample width
  localparam int unsigned COEF_W    = 12;  // MAC coefficient width
  localparam int unsigned COEF_FRAC = 10;  // fractional bits of coefficients
  localparam int unsigned ACC_W     = 34;  // MAC accumulator width
  localparam int unsigned P_BITS    = 7;   // p, noise shaper output bits
  localparam int unsigned OSR       = 16;  // M, oversampling factor
  localparam int unsigned N_STAGES  = 4;   // S, cascaded x2 stages

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Delay line length (input samples kept) per stage: ceil(taps/2).
  // All delay lines live in one array; stage s owns DL_LEN[s] entries from
  // DL_BASE[s] on, the newest sample first.
  localparam int unsigned DL_LEN  [N_STAGES] = '{17, 6, 3, 2};
  localparam int unsigned DL_BASE [N_STAGES] = '{0, 17, 23, 26};
  localparam int unsigned DL_TOTAL = 28;

  // Program entry ranges, indexed [stage][phase]: first entry and count.
  localparam int unsigned PRG_FIRST [N_STAGES][2] = '{'{0, 1}, '{17, 23}, '{29, 32}, '{35, 37}};
  localparam int unsigned PRG_COUNT [N_STAGES][2] = '{'{1, 16}, '{6, 6},  '{3, 3},   '{2, 2}};
  localparam int unsigned PRG_LEN = 39;

  typedef struct packed {
    coef_t      coef;  // h[2j+p]
    logic [4:0] tap;   // j, index into the stage delay line (0 = newest)
  } prg_entry_t;

  // Stage 1 (order 32, half band), phase 0: centre tap h[16] at j = 8.
  // Stage 1, phase 1: h[1], h[3], ..., h[31] at j = 0..15.
  // Stages 2-4: h[p], h[p+2], ... at j = 0, 1, ...
  localparam prg_entry_t PRG [PRG_LEN] = '{
    // stage 1, phase 0
    '{12'sd1024, 5'd8},
    // stage 1, phase 1
    '{-12'sd4, 5'd0},  '{12'sd10, 5'd1},  '{-12'sd19, 5'd2},  '{12'sd35, 5'd3},
    '{-12'sd61, 5'd4}, '{12'sd106, 5'd5}, '{-12'sd202, 5'd6}, '{12'sd647, 5'd7},
    '{12'sd647, 5'd8}, '{-12'sd202, 5'd9}, '{12'sd106, 5'd10}, '{-12'sd61, 5'd11},
    '{12'sd35, 5'd12}, '{-12'sd19, 5'd13}, '{12'sd10, 5'd14}, '{-12'sd4, 5'd15},
    // stage 2 (order 11), phase 0: h[0], h[2], ..., h[10]
    '{12'sd10, 5'd0}, '{-12'sd65, 5'd1}, '{12'sd279, 5'd2},
    '{12'sd892, 5'd3}, '{-12'sd111, 5'd4}, '{12'sd18, 5'd5},
    // stage 2, phase 1: h[1], h[3], ..., h[11]
    '{12'sd18, 5'd0}, '{-12'sd111, 5'd1}, '{12'sd892, 5'd2},
    '{12'sd279, 5'd3}, '{-12'sd65, 5'd4}, '{12'sd10, 5'd5},
    // stage 3 (order 5)
    '{-12'sd90, 5'd0}, '{12'sd936, 5'd1}, '{12'sd178, 5'd2},
    '{12'sd178, 5'd0}, '{12'sd936, 5'd1}, '{-12'sd90, 5'd2},
    // stage 4 (order 3)
    '{12'sd243, 5'd0}, '{12'sd781, 5'd1},
    '{12'sd781, 5'd0}, '{12'sd243, 5'd1}
  };

  // Per-event status pulses of the amplifier top level (one clock each).
  typedef struct packed {
    logic underrun;     // carrier period started with no oversampled sample ready
    logic ns_overload;  // noise shaper saturated its output word
    logic clamp_lo;     // pulse widened to the minimum guard width
    logic clamp_hi;     // pulse cut to the maximum guarded width
    logic comp_ext;     // current-sign feedback lengthened the pulse
    logic comp_cut;     // current-sign feedback shortened the pulse
  } amp_status_t;

  // Gate commands of the full bridge (1 = switch on).
  typedef struct packed {
    logic a_hs;  // leg A high side (P-MOS)
    logic a_ls;  // leg A low side (N-MOS)
    logic b_hs;  // leg B high side
    logic b_ls;  // leg B low side
  } gates_t;

  // Saturate a wide signed value to a DATA_W-bit sample.
  function automatic sample_t sat_sample(input logic signed [ACC_W-1:0] v);
    localparam logic signed [ACC_W-1:0] MAXV = (ACC_W'(1) <<< (DATA_W-1)) - 1;
    localparam logic signed [ACC_W-1:0] MINV = -(ACC_W'(1) <<< (DATA_W-1));
    if (v > MAXV)      return sample_t'(MAXV);
    else if (v < MINV) return sample_t'(MINV);
    else               return sample_t'(v);
  endfunction

endpackage
