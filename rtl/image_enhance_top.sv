// image_enhance_top: the point-wise image enhancement algorithms, side by side.
//
// A gray-level image arrives as a stream of 8-bit pixels, one per clock, in
// raster order (the host flattens the 2-D image into a 1-D sequence and
// rebuilds the picture from the results). Every pixel is fed to all seven
// transforms at once and each result appears on its own output:
//   bright_o   brightness control, +G with saturation at 255
//   stretch1_o contrast stretching 1, (x - S1_LOW) * S1_GAIN + S1_OFFSET
//   stretch2_o contrast stretching 2, (x - 160) * 3 + 192
//   neg_o      negative, 255 - x
//   seg_o      threshold segmentation at THRESH (seg_obj_o: object pixel)
//   range_o    range highlighting between RANGE_LO and RANGE_HI
//              (range_in_o: pixel lies inside the band)
//   par_cap_o, par_cup_o  the two parabola transforms
// The seven algorithms and their constants follow the design, which builds
// and measures each of them as a separate data path on the same pixel
// stream; bringing them together behind one input is this design's choice,
// as is S1_GAIN (the gain of the first stretching is not known).
//
// Timing: no registers. Every output is a combinational function of pix_i,
// so results belong to the pixel presented in the same cycle and the design
// accepts one pixel per cycle. Pixel order and framing are left to the host.
module image_enhance_top
  import enh_pkg::*;
#(
  parameter int unsigned G         = 40,
  parameter int unsigned S1_LOW    = 5,
  parameter int unsigned S1_GAIN   = 2,
  parameter int unsigned S1_OFFSET = 2,
  parameter int unsigned S2_LOW    = 160,
  parameter int unsigned S2_GAIN   = 3,
  parameter int unsigned S2_OFFSET = 192,
  parameter int unsigned THRESH    = 50,
  parameter int unsigned RANGE_LO  = 100,
  parameter int unsigned RANGE_HI  = 180
) (
  input  pixel_t pix_i,
  output pixel_t bright_o,
  output pixel_t stretch1_o,
  output pixel_t stretch2_o,
  output pixel_t neg_o,
  output pixel_t seg_o,
  output logic   seg_obj_o,
  output pixel_t range_o,
  output logic   range_in_o,
  output pixel_t par_cap_o,
  output pixel_t par_cup_o
);

  brightness #(.G(G)) u_brightness (
    .pix_i (pix_i),
    .pix_o (bright_o)
  );

  contrast_stretch #(.LOW(S1_LOW), .GAIN(S1_GAIN), .OFFSET(S1_OFFSET)) u_stretch1 (
    .pix_i (pix_i),
    .pix_o (stretch1_o)
  );

  contrast_stretch #(.LOW(S2_LOW), .GAIN(S2_GAIN), .OFFSET(S2_OFFSET)) u_stretch2 (
    .pix_i (pix_i),
    .pix_o (stretch2_o)
  );

  negative u_negative (
    .pix_i (pix_i),
    .pix_o (neg_o)
  );

  threshold_seg #(.THRESH(THRESH)) u_threshold (
    .pix_i (pix_i),
    .pix_o (seg_o),
    .obj_o (seg_obj_o)
  );

  range_highlight u_range (
    .pix_i      (pix_i),
    .lo_i       (pixel_t'(RANGE_LO)),
    .hi_i       (pixel_t'(RANGE_HI)),
    .pix_o      (range_o),
    .in_range_o (range_in_o)
  );

  parabola u_parabola (
    .pix_i (pix_i),
    .cap_o (par_cap_o),
    .cup_o (par_cup_o)
  );

endmodule
