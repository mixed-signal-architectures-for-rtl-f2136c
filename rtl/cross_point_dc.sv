// cross_point_dc: natural-PWM cross-point estimator, delta-compensation method.
//
// A uniformly sampled PWM pulse has the width of the sample x[n] taken at the
// start of the carrier period; natural PWM would end the pulse where the
// carrier ramp meets the continuous signal. For the 3-level modulator the ramp
// runs from 0 to full scale over one period and is compared with |x|. Taking
// the signal as linear between x[n] and x[n+1], the crossing time tau
// (in periods) solves |x[n]| + tau*D = tau with D = |x[n+1]| - |x[n]|, i.e.
// tau = |x[n]| / (1 - D). The delta-compensation estimator keeps the first
// order term only, tau ~ |x[n]| * (1 + D), which needs one multiplication and
// no division. In signed form the corrected sample is
//     y[n] = x[n] + x[n] * (|x[n+1]| - |x[n]|)
// rounded to the sample width and saturated.
//
// Interface: one sample per 'in_valid' pulse. Because x[n+1] is needed, the
// output for x[n] is produced when x[n+1] arrives: 'out_valid' is a pulse one
// clock after each 'in_valid', carrying the corrected previous sample (the
// block adds one sample of latency). Samples are signed fractions of DW
// bits (Q1.15 at the default 16). The held sample
// resets to zero.
//
// From the published design: the use of a 2-point first-order estimator with one multiply per
// sample placed after the oversampler. This design's choices: the exact first
// order formula above (the document's formulas were in a figure), word widths,
// rounding and saturation.
module cross_point_dc
  import amp_pkg::*;
#(
  parameter int unsigned DW = DATA_W // sample width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  in_data,
  output logic                  out_valid,
  output logic signed [DW-1:0]  out_data
);

  localparam int unsigned SW = DW + 4;    // sum width, ample headroom

  typedef logic signed [DW-1:0] smp_t;

  function automatic smp_t sat(input logic signed [SW-1:0] v);
    localparam logic signed [SW-1:0] MAXV = (SW'(1) <<< (DW-1)) - 1;
    localparam logic signed [SW-1:0] MINV = -(SW'(1) <<< (DW-1));
    if (v > MAXV)      return smp_t'(MAXV);
    else if (v < MINV) return smp_t'(MINV);
    else               return smp_t'(v);
  endfunction

  smp_t x_cur;                          // x[n], waiting for x[n+1]
  logic signed [DW:0]   abs_cur, abs_next, delta;
  logic signed [2*DW:0] prod;          // x[n] * D, 2*DW-2 fraction bits
  logic signed [SW-1:0]     sum;

  function automatic logic signed [DW:0] abs_s(input smp_t v);
    logic signed [DW:0] e = {v[DW-1], v};
    return e[DW] ? -e : e;
  endfunction

  always_comb begin
    abs_cur  = abs_s(x_cur);
    abs_next = abs_s(in_data);
    delta    = abs_next - abs_cur;                // |x[n+1]| - |x[n]|
    prod     = x_cur * delta;                     // x[n] * D
    sum      = SW'(x_cur) + SW'((prod + (1 <<< (DW-2))) >>> (DW-1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cur     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= sat(sum);
        x_cur    <= in_data;
      end
    end
  end

endmodule
