// noise_shaper: requantizes the IN_W-bit oversampled signal (16 bits by
// default) to the P_BITS-bit PWM word with 5th-order error feedback.
//
// Each sample u = x + F(e) is rounded to the P_BITS-bit grid (a step of
// 2^(IN_W-P_BITS) input LSBs), and the residue e = u - y*step is fed back through
// the shaping filter H(z) = 1 - (1 - z^-1)^5:
//     u[n] = x[n] + 5e[n-1] - 10e[n-2] + 10e[n-3] - 5e[n-4] + e[n-5]
// so that y = x - (1 - z^-1)^5 * e: the quantisation noise is pushed out of
// the audio band by a 5th-order differentiator (NTF = H(z) - 1 up to sign).
// The integer coefficients need only shifts and adds.
//
// Overload: if u leaves the output range the word saturates ('overload' is
// high for that sample) and the stored residue is clamped to +/-1 output LSB,
// which keeps the high-order loop from running away.
//
// Interface: one sample per 'in_valid' pulse (Q1.15 at IN_W = 16), result one clock later
// with an 'out_valid' pulse; out_data is P_BITS-bit two's complement (the
// value y means y/2^(P_BITS-1) of full scale). Reset clears the error history.
//
// From the published design: the structure of the noise shaping circuit (n bits in, p bits out,
// FIR shaping filter), H(z), K = 5 and p = 7. This design's choices: rounding,
// word widths and the overload handling.
module noise_shaper
  import amp_pkg::*;
#(
  parameter int unsigned IN_W  = DATA_W,
  parameter int unsigned OUT_W = P_BITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic                    overload
);

  localparam int unsigned SH  = IN_W - OUT_W;      // dropped bits
  localparam int unsigned W   = IN_W + 6;          // internal width
  localparam int unsigned EW  = SH + 2;            // residue width
  localparam logic signed [W-1:0] STEP = W'(1) <<< SH;
  localparam logic signed [W-1:0] QMAX = (W'(1) <<< (OUT_W-1)) - 1;
  localparam logic signed [W-1:0] QMIN = -(W'(1) <<< (OUT_W-1));

  logic signed [EW-1:0] e [1:5];                   // e[k] = e[n-k]
  logic signed [W-1:0]  fb, u, q, q_sat, res, res_c;
  logic                 ovl;

  function automatic logic signed [W-1:0] ext(input logic signed [EW-1:0] v);
    return W'(v);
  endfunction

  always_comb begin
    fb  = (ext(e[1]) <<< 2) + ext(e[1])
        - (ext(e[2]) <<< 3) - (ext(e[2]) <<< 1)
        + (ext(e[3]) <<< 3) + (ext(e[3]) <<< 1)
        - (ext(e[4]) <<< 2) - ext(e[4])
        + ext(e[5]);
    u   = W'(in_data) + fb;
    q   = (u + (STEP >>> 1)) >>> SH;               // round to nearest
    ovl = (q > QMAX) || (q < QMIN);
    q_sat = (q > QMAX) ? QMAX : (q < QMIN) ? QMIN : q;
    res = u - (q_sat <<< SH);
    if (res > STEP)       res_c = STEP;
    else if (res < -STEP) res_c = -STEP;
    else                  res_c = res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= 5; k++) e[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      overload  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        e[1] <= EW'(res_c);
        for (int k = 2; k <= 5; k++) e[k] <= e[k-1];
        out_data <= OUT_W'(q_sat);
        overload <= ovl;
      end
    end
  end

endmodule
