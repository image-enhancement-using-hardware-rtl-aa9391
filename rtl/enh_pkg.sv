// enh_pkg: types and constants shared by the point-wise image enhancement
// transforms.
//
// Every transform in this design maps one 8-bit unsigned gray-level pixel
// (0 = black, 255 = white) to another, independently of its neighbours, so
// the only thing the modules share is the pixel type and its range. The
// 8-bit unsigned pixel (an unsigned fixed-point value with no fraction bits)
// follows the design; the helper function is this implementation's own.
package enh_pkg;

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;  // 255

  typedef logic [PIX_W-1:0] pixel_t;

  // Clamp a signed intermediate result into the pixel range 0..PIX_MAX.
  // Used by transforms whose arithmetic can leave the range.
  function automatic pixel_t clamp_pixel(input logic signed [31:0] v);
    if (v < 0)
      return '0;
    else if (v > $signed(PIX_MAX))
      return pixel_t'(PIX_MAX);
    else
      return pixel_t'(v);
  endfunction

endpackage
