// fxp_mul: registered signed fixed-point multiplier.
//
// Both operands and the result are W-bit two's complement numbers with FRAC
// fraction bits (value = word / 2**FRAC). The full 2W-bit product is shifted
// right arithmetically by FRAC bits and its low W bits are kept, so the
// result is truncated toward minus infinity and wraps on overflow; there is
// no rounding or saturation. That reduction of the product back to the word
// width is where the fixed-point engine loses precision against double
// precision; the truncation rule itself is this design's choice.
//
// Timing: p is valid one clock after a and b.
module fxp_mul #(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 24
) (
  input  logic                clk,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] p
);

  logic signed [2*W-1:0] full;
  logic signed [W-1:0]   scaled;

  always_comb begin
    full   = a * b;
    scaled = W'(full >>> FRAC);
  end

  always_ff @(posedge clk) p <= scaled;

endmodule
