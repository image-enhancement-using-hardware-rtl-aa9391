// contrast_stretch: linear contrast (histogram) stretching of a gray level.
//
// The transform is new = (old - LOW) * GAIN + OFFSET. Pixels around LOW are
// spread apart by the factor GAIN and shifted to start at OFFSET, which
// stretches the chosen band of gray levels over more of the 0..255 range.
// The result is clamped to 0..255. The formula and the numbers of the second
// stretching (LOW = 160, GAIN = 3, OFFSET = 192, the defaults here) follow
// the design. The first stretching is the same module with LOW = 5 and
// OFFSET = 2; its gain is not known and GAIN = 2 is this design's choice for
// it. Clamping (rather than wrapping) is also this design's choice.
//
// Interface: pix_i is the input pixel, pix_o the stretched pixel.
// Timing: purely combinational, zero cycles of latency.
module contrast_stretch
  import enh_pkg::*;
#(
  parameter int unsigned LOW    = 160,  // gray level subtracted first
  parameter int unsigned GAIN   = 3,    // contrast factor
  parameter int unsigned OFFSET = 192   // gray level added last
) (
  input  pixel_t pix_i,
  output pixel_t pix_o
);

  logic signed [31:0] diff;
  logic signed [31:0] scaled;

  always_comb begin
    diff   = $signed({24'd0, pix_i}) - $signed(LOW);
    scaled = diff * $signed(GAIN) + $signed(OFFSET);
    pix_o  = clamp_pixel(scaled);
  end

endmodule
