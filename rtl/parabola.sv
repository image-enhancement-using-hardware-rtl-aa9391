// parabola: the two parabola gray-level transforms.
//
// With u = x/128 - 1 (so u runs from -1 at black through 0 at mid-gray
// 128 to nearly +1 at white), the design defines
//   cup_o = 255 * u^2           (dark and bright ends map high, mid-gray to 0)
//   cap_o = 255 - 255 * u^2     (mid-gray maps to 255, the ends map low)
// Both formulas follow the design. They are computed exactly in integers:
// u^2 * 255 = (x - 128)^2 * 255 / 16384, a 15-bit square times 255 that fits
// in 22 bits, and each output is the floor of its exact value. The integer
// formulation and the rounding toward zero are this design's choices.
//
// Interface: pix_i is the input pixel, cap_o and cup_o the two results.
// Timing: purely combinational (one squarer and one constant multiply),
// zero cycles of latency.
module parabola
  import enh_pkg::*;
(
  input  pixel_t pix_i,
  output pixel_t cap_o,
  output pixel_t cup_o
);

  localparam int unsigned MID   = 1 << (PIX_W - 1);   // 128
  localparam int unsigned SHIFT = 2 * (PIX_W - 1);    // 14: divide by 128^2

  logic signed [PIX_W:0]     d;      // x - 128, -128..127
  logic        [2*PIX_W-1:0] sq;     // (x - 128)^2, 0..16384
  logic        [2*PIX_W+7:0] prod;   // sq * 255
  logic        [2*PIX_W+7:0] full;   // 255 * 16384

  always_comb begin
    d     = $signed({1'b0, pix_i}) - $signed((PIX_W+1)'(MID));
    sq    = (2*PIX_W)'(d * d);
    prod  = (2*PIX_W+8)'(sq) * (2*PIX_W+8)'(PIX_MAX);
    full  = (2*PIX_W+8)'(PIX_MAX) << SHIFT;
    cup_o = pixel_t'(prod >> SHIFT);
    cap_o = pixel_t'((full - prod) >> SHIFT);
  end

endmodule
