// tb_threshold_seg: exhaustive self-check of threshold segmentation.
//
// Default threshold 50 and a second instance at 200. For every gray level
// the pixel output must be the input when above the threshold and 0
// otherwise, and the object flag must agree. Counts object and background
// pixels and fails if either class never occurred.
module tb_threshold_seg;
  import enh_pkg::*;

  logic   clk = 1'b0;
  pixel_t pix;
  pixel_t out50, out200;
  logic   obj50, obj200;
  int     checks = 0, failures = 0, n_obj = 0, n_bg = 0;

  always #5 clk = ~clk;

  threshold_seg                 dut50  (.pix_i(pix), .pix_o(out50),  .obj_o(obj50));
  threshold_seg #(.THRESH(200)) dut200 (.pix_i(pix), .pix_o(out200), .obj_o(obj200));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      int w50, w200;
      @(negedge clk);
      pix = pixel_t'(x);
      #1;
      w50  = (x > 50)  ? x : 0;
      w200 = (x > 200) ? x : 0;
      checks += 4;
      if (int'(out50) != w50) begin
        failures++; $display("T50 x=%0d got %0d want %0d", x, out50, w50);
      end
      if (obj50 != (x > 50)) begin
        failures++; $display("T50 x=%0d obj flag %0b", x, obj50);
      end
      if (int'(out200) != w200) begin
        failures++; $display("T200 x=%0d got %0d want %0d", x, out200, w200);
      end
      if (obj200 != (x > 200)) begin
        failures++; $display("T200 x=%0d obj flag %0b", x, obj200);
      end
      if (obj50) n_obj++; else n_bg++;
    end
    $display("threshold 50: object %0d, background %0d", n_obj, n_bg);
    checks++;
    if (n_obj != 205 || n_bg != 51) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
