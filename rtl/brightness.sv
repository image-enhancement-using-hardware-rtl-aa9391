// brightness: brightness control by adding a constant gray-level offset.
//
// Every pixel gets the constant G added to it: J = I + G. When the sum would
// exceed 255 the output saturates at 255, so bright pixels clip to white
// instead of wrapping around to dark values. The adder-with-a-constant
// structure, G = 40 and the saturation at 255 follow the design; only the
// widths of the internal sum are this implementation's choice.
//
// Interface: pix_i is the input pixel, pix_o the brightened pixel.
// Timing: purely combinational, zero cycles of latency, like the unregistered
// adder of the original data path; a new pixel can be applied every cycle.
module brightness
  import enh_pkg::*;
#(
  parameter int unsigned G = 40  // gray-level offset, g > 0
) (
  input  pixel_t pix_i,
  output pixel_t pix_o
);

  // One extra bit holds the carry that signals a sum above 255.
  logic [PIX_W:0] sum;

  always_comb begin
    sum = {1'b0, pix_i} + (PIX_W+1)'(G);
    if (sum > (PIX_W+1)'(PIX_MAX))
      pix_o = pixel_t'(PIX_MAX);
    else
      pix_o = sum[PIX_W-1:0];
  end

endmodule
