// negative: photographic negative of a gray-level image.
//
// Each pixel is replaced by 255 - pixel, exchanging dark and light values.
// The subtraction from the constant 255 follows the design. Because the input
// is at most 255 the difference can never go below zero.
//
// Interface: pix_i is the input pixel, pix_o its complement.
// Timing: purely combinational, zero cycles of latency.
module negative
  import enh_pkg::*;
(
  input  pixel_t pix_i,
  output pixel_t pix_o
);

  always_comb pix_o = pixel_t'(PIX_MAX) - pix_i;

endmodule
