// mac_unit: the single multiply-accumulate unit of the interpolating filter.
//
// One signed DATA_W x COEF_W product per clock is added to an ACC_W-bit
// accumulator. 'clr' together with 'en' starts a new sum with the current
// product (acc <= a*b), 'en' alone accumulates (acc <= acc + a*b); with 'en'
// low the accumulator holds. The result is available on 'acc' one clock after
// the last product was presented. Reset clears the accumulator.
//
// The document fixes one MAC per cycle and 12-bit fixed-point arithmetic; the
// 16-bit data operand and 34-bit accumulator are this design's choice (the
// accumulator holds the largest program, 17 products of 16x12 bits, without
// overflow).
module mac_unit
  import amp_pkg::*;
#(
  parameter int unsigned A_W   = DATA_W,
  parameter int unsigned B_W   = COEF_W,
  parameter int unsigned ACC_WIDTH = ACC_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,    // accumulate a*b this cycle
  input  logic                        clr,   // with en: start a new sum
  input  logic signed [A_W-1:0]       a,
  input  logic signed [B_W-1:0]       b,
  output logic signed [ACC_WIDTH-1:0] acc
);

  logic signed [A_W+B_W-1:0] prod;

  always_comb prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (en) begin
      if (clr)       acc <= ACC_WIDTH'(prod);
      else           acc <= acc + ACC_WIDTH'(prod);
    end
  end

endmodule
