// tb_negative: exhaustive self-check of the negative transform.
//
// Applies every gray level and checks that the output plus the input is
// exactly 255 (the complement). Zero latency: checked in the same cycle.
module tb_negative;
  import enh_pkg::*;

  logic   clk = 1'b0;
  pixel_t pix;
  pixel_t out;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  negative dut (.pix_i(pix), .pix_o(out));

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
      if (int'(out) + x != 255) begin
        failures++;
        $display("x=%0d got %0d want %0d", x, out, 255 - x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
