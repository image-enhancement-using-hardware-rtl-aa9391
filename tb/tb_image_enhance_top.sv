// tb_image_enhance_top: end-to-end run of a whole image through every transform.
//
// A ROWS x COLS gray-level test image is generated here (smooth gradients,
// a bright disc and pseudo-random texture, so every gray level is present).
// Like the host side of the original flow, the testbench flattens the image
// row by row into a pixel stream, applies one pixel per clock to the top
// with all parameters at their defaults, collects the results in the next
// half cycle and rebuilds one output image per transform. Each output pixel
// is then compared with a reference written directly from the formulas.
//
// Checked besides the values: the frame takes exactly ROWS*COLS cycles (one
// pixel per clock, no latency), and every mechanism of the design happens at
// least once: brightness saturation, both clamps of each contrast stretch,
// object and background pixels of the segmentation, pixels inside and outside
// the highlighted range, and the extremes of both parabola curves.
module tb_image_enhance_top;
  import enh_pkg::*;

  localparam int ROWS = 256;
  localparam int COLS = 256;
  localparam int NPIX = ROWS * COLS;

  logic   clk = 1'b0;
  pixel_t pix;
  pixel_t bright, s1, s2, neg, seg, rng, cap, cup;
  logic   seg_obj, rng_in;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  image_enhance_top dut (
    .pix_i      (pix),
    .bright_o   (bright),
    .stretch1_o (s1),
    .stretch2_o (s2),
    .neg_o      (neg),
    .seg_o      (seg),
    .seg_obj_o  (seg_obj),
    .range_o    (rng),
    .range_in_o (rng_in),
    .par_cap_o  (cap),
    .par_cup_o  (cup)
  );

  // Input image and one output image per transform.
  pixel_t img     [ROWS][COLS];
  pixel_t o_bright[ROWS][COLS];
  pixel_t o_s1    [ROWS][COLS];
  pixel_t o_s2    [ROWS][COLS];
  pixel_t o_neg   [ROWS][COLS];
  pixel_t o_seg   [ROWS][COLS];
  pixel_t o_rng   [ROWS][COLS];
  pixel_t o_cap   [ROWS][COLS];
  pixel_t o_cup   [ROWS][COLS];
  logic   o_obj   [ROWS][COLS];
  logic   o_in    [ROWS][COLS];

  // Mechanism counters.
  int n_bright_sat, n_s1_low, n_s1_high, n_s2_low, n_s2_high;
  int n_obj, n_bg, n_in, n_out, n_cap_top, n_cup_top;

  function automatic int clamp255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic expect_eq(string what, int r, int c, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20)
        $display("%s (%0d,%0d) x=%0d got %0d want %0d", what, r, c, img[r][c], got, want);
    end
  endtask

  initial begin
    repeat (NPIX + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_start, t_end;

    // Build the test image.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int v, dr, dc;
        dr = r - ROWS / 2;
        dc = c - COLS / 2;
        v  = (r + c) / 2 + int'($urandom_range(31)) - 16;
        if (dr * dr + dc * dc < (ROWS / 5) * (ROWS / 5)) v = v + 90;
        if (r < 4) v = c;  // a full 0..255 ramp in the top rows
        img[r][c] = pixel_t'(clamp255(v));
      end

    // Stream it in raster order, one pixel per clock.
    @(negedge clk);
    t_start = longint'($time);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        pix = img[r][c];
        @(posedge clk);
        o_bright[r][c] = bright;
        o_s1[r][c]     = s1;
        o_s2[r][c]     = s2;
        o_neg[r][c]    = neg;
        o_seg[r][c]    = seg;
        o_rng[r][c]    = rng;
        o_cap[r][c]    = cap;
        o_cup[r][c]    = cup;
        o_obj[r][c]    = seg_obj;
        o_in[r][c]     = rng_in;
        @(negedge clk);
      end
    t_end = longint'($time);

    checks++;
    if ((t_end - t_start) / 10 != NPIX) begin
      failures++;
      $display("frame took %0d cycles, expected %0d", (t_end - t_start) / 10, NPIX);
    end

    // Compare every output image with the formulas.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int x, q_num, b, v1, v2;
        bit obj, inb;
        x = int'(img[r][c]);

        b = x + 40;
        if (b > 255) n_bright_sat++;
        expect_eq("bright", r, c, o_bright[r][c], clamp255(b));

        v1 = (x - 5) * 2 + 2;
        if (v1 < 0) n_s1_low++;
        if (v1 > 255) n_s1_high++;
        expect_eq("stretch1", r, c, o_s1[r][c], clamp255(v1));

        v2 = (x - 160) * 3 + 192;
        if (v2 < 0) n_s2_low++;
        if (v2 > 255) n_s2_high++;
        expect_eq("stretch2", r, c, o_s2[r][c], clamp255(v2));

        expect_eq("negative", r, c, o_neg[r][c], 255 - x);

        obj = x > 50;
        if (obj) n_obj++; else n_bg++;
        expect_eq("seg", r, c, o_seg[r][c], obj ? x : 0);
        expect_eq("seg_obj", r, c, int'(o_obj[r][c]), int'(obj));

        inb = (x > 100) && (x < 180);
        if (inb) n_in++; else n_out++;
        expect_eq("range", r, c, o_rng[r][c], inb ? x : 1);
        expect_eq("range_in", r, c, int'(o_in[r][c]), int'(inb));

        // 255 * (x/128 - 1)^2 = 255 * (x - 128)^2 / 16384
        q_num = 255 * (x - 128) * (x - 128);
        expect_eq("par_cup", r, c, o_cup[r][c], q_num / 16384);
        expect_eq("par_cap", r, c, o_cap[r][c], (255 * 16384 - q_num) / 16384);
        if (o_cap[r][c] == 8'd255) n_cap_top++;
        if (o_cup[r][c] == 8'd255) n_cup_top++;
      end

    $display("pixels %0d; brightness saturated %0d", NPIX, n_bright_sat);
    $display("stretch1 clamped low %0d high %0d; stretch2 clamped low %0d high %0d",
             n_s1_low, n_s1_high, n_s2_low, n_s2_high);
    $display("segmentation object %0d background %0d", n_obj, n_bg);
    $display("range inside %0d outside %0d", n_in, n_out);
    $display("parabola cap at 255: %0d, cup at 255: %0d", n_cap_top, n_cup_top);

    // Each mechanism must have occurred at least once.
    // Stretch 1 clamps low only for x < 4, which the ramp rows supply.
    checks += 10;
    if (n_bright_sat == 0) begin failures++; $display("no brightness saturation"); end
    if (n_s1_low == 0)     begin failures++; $display("stretch1 never clamped low"); end
    if (n_s1_high == 0)    begin failures++; $display("stretch1 never clamped high"); end
    if (n_s2_low == 0)     begin failures++; $display("stretch2 never clamped low"); end
    if (n_s2_high == 0)    begin failures++; $display("stretch2 never clamped high"); end
    if (n_obj == 0 || n_bg == 0) begin failures++; $display("segmentation one-sided"); end
    if (n_in == 0)         begin failures++; $display("range never inside"); end
    if (n_out == 0)        begin failures++; $display("range never outside"); end
    if (n_cap_top == 0)    begin failures++; $display("cap curve never at 255"); end
    if (n_cup_top == 0)    begin failures++; $display("cup curve never at 255"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
