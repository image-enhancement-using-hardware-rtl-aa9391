// tb_contrast_stretch: exhaustive self-check of the contrast stretcher.
//
// Two instances: the default (LOW 160, GAIN 3, OFFSET 192) and the first
// stretching (LOW 5, GAIN 2, OFFSET 2). Every gray level is applied and the
// result compared with the clamped linear formula computed here. Counts how
// often each clamp (below 0, above 255) and the linear region occurred and
// fails if one of them never did. Zero latency: checked in the same cycle.
module tb_contrast_stretch;
  import enh_pkg::*;

  logic   clk = 1'b0;
  pixel_t pix;
  pixel_t out_s2, out_s1;
  int     checks = 0, failures = 0;
  int     n_low = 0, n_high = 0, n_lin = 0;

  always #5 clk = ~clk;

  contrast_stretch                                    dut_s2 (.pix_i(pix), .pix_o(out_s2));
  contrast_stretch #(.LOW(5), .GAIN(2), .OFFSET(2))   dut_s1 (.pix_i(pix), .pix_o(out_s1));

  function automatic int ref_stretch(int x, int lo, int gain, int off);
    int v = (x - lo) * gain + off;
    if (v < 0)   return 0;
    if (v > 255) return 255;
    return v;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      int raw;
      @(negedge clk);
      pix = pixel_t'(x);
      #1;
      checks++;
      if (int'(out_s2) != ref_stretch(x, 160, 3, 192)) begin
        failures++;
        $display("S2 x=%0d got %0d want %0d", x, out_s2, ref_stretch(x, 160, 3, 192));
      end
      checks++;
      if (int'(out_s1) != ref_stretch(x, 5, 2, 2)) begin
        failures++;
        $display("S1 x=%0d got %0d want %0d", x, out_s1, ref_stretch(x, 5, 2, 2));
      end
      raw = (x - 160) * 3 + 192;
      if (raw < 0) n_low++;
      else if (raw > 255) n_high++;
      else n_lin++;
    end
    $display("stretch2: clamped low %0d, clamped high %0d, linear %0d", n_low, n_high, n_lin);
    checks++;
    if (n_low == 0 || n_high == 0 || n_lin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
