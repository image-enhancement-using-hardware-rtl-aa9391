// threshold_seg: segmentation of an image by a fixed gray-level threshold.
//
// Each pixel is compared with THRESH on its own. Pixels brighter than the
// threshold are taken to belong to objects of interest and pass unchanged;
// all others are background and are set to 0 (black). The pixel-by-pixel
// threshold decision and THRESH = 50 follow the design. What the output is
// on either side of the threshold is this design's choice: the original
// shows gray-level (not black-and-white) results, so object pixels keep
// their value here.
//
// Interface: pix_i is the input pixel, pix_o the segmented pixel, obj_o is
// high when the pixel was classified as object.
// Timing: purely combinational, zero cycles of latency.
module threshold_seg
  import enh_pkg::*;
#(
  parameter int unsigned THRESH = 50
) (
  input  pixel_t pix_i,
  output pixel_t pix_o,
  output logic   obj_o
);

  always_comb begin
    obj_o = (pix_i > pixel_t'(THRESH));
    pix_o = obj_o ? pix_i : '0;
  end

endmodule
