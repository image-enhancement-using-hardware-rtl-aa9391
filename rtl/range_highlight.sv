// range_highlight: intensity-range highlighting transform.
//
// A pixel x whose gray level lies strictly between the bounds lo_i and hi_i
// (lo < x < hi) passes unchanged; every other pixel is replaced by the
// constant FILL. This keeps one band of gray levels and flattens the rest.
// The rule z = x if (x > y) and (x < c), else z = 1, and taking the bounds as
// inputs (driven by constants 100 and 180 in the original) follow the design.
//
// Interface: pix_i is the pixel, lo_i and hi_i the exclusive bounds, pix_o
// the result, in_range_o is high when the pixel lies inside the band.
// Timing: purely combinational, zero cycles of latency.
module range_highlight
  import enh_pkg::*;
#(
  parameter int unsigned FILL = 1  // value given to pixels outside the band
) (
  input  pixel_t pix_i,
  input  pixel_t lo_i,
  input  pixel_t hi_i,
  output pixel_t pix_o,
  output logic   in_range_o
);

  always_comb begin
    in_range_o = (pix_i > lo_i) && (pix_i < hi_i);
    pix_o      = in_range_o ? pix_i : pixel_t'(FILL);
  end

endmodule
