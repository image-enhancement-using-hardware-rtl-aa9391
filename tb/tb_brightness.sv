// tb_brightness: exhaustive self-check of the brightness adder.
//
// Applies every gray level 0..255 for G = 40 (the default) and for a second
// instance with G = 200, and compares the output with min(x + G, 255)
// worked out here. The block has no latency, so each output is checked in
// the cycle its input is applied. Also counts how many inputs saturated.
module tb_brightness;
  import enh_pkg::*;

  logic   clk = 1'b0;
  pixel_t pix;
  pixel_t out40, out200;
  int     checks = 0, failures = 0, saturated = 0;

  always #5 clk = ~clk;

  brightness                dut40  (.pix_i(pix), .pix_o(out40));
  brightness #(.G(200))     dut200 (.pix_i(pix), .pix_o(out200));

  function automatic int ref_bright(int x, int g);
    int s = x + g;
    return (s > 255) ? 255 : s;
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
      @(negedge clk);
      pix = pixel_t'(x);
      #1;
      checks++;
      if (int'(out40) != ref_bright(x, 40)) begin
        failures++;
        $display("G=40 x=%0d got %0d want %0d", x, out40, ref_bright(x, 40));
      end
      checks++;
      if (int'(out200) != ref_bright(x, 200)) begin
        failures++;
        $display("G=200 x=%0d got %0d want %0d", x, out200, ref_bright(x, 200));
      end
      if (x + 40 > 255) saturated++;
    end
    // Saturation starts exactly at 255 - G + 1 = 216.
    checks++;
    if (saturated != 40) failures++;
    $display("saturated inputs (G=40): %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
