// tb_parabola: exhaustive self-check of the two parabola transforms.
//
// For every gray level the reference is evaluated in floating point from
// the formulas 255 * (x/128 - 1)^2 and 255 - 255 * (x/128 - 1)^2 and
// rounded down; all intermediate values are exact in double precision, so
// the hardware must match bit for bit. Spot checks at 0, 128 and 255 pin
// the shape of both curves.
module tb_parabola;
  import enh_pkg::*;

  logic   clk = 1'b0;
  pixel_t pix;
  pixel_t cap, cup;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  parabola dut (.pix_i(pix), .cap_o(cap), .cup_o(cup));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      real u, q;
      int  want_cup, want_cap;
      @(negedge clk);
      pix = pixel_t'(x);
      #1;
      u        = real'(x) / 128.0 - 1.0;
      q        = 255.0 * u * u;
      want_cup = int'($floor(q));
      want_cap = int'($floor(255.0 - q));
      checks += 2;
      if (int'(cup) != want_cup) begin
        failures++; $display("x=%0d cup got %0d want %0d", x, cup, want_cup);
      end
      if (int'(cap) != want_cap) begin
        failures++; $display("x=%0d cap got %0d want %0d", x, cap, want_cap);
      end
      if (x == 0) begin
        checks += 2;
        if (cup != 8'd255) failures++;
        if (cap != 8'd0)   failures++;
      end
      if (x == 128) begin
        checks += 2;
        if (cup != 8'd0)   failures++;
        if (cap != 8'd255) failures++;
      end
      if (x == 255) begin  // 255 * 127^2 / 128^2 = 251.03...
        checks += 2;
        if (cup != 8'd251) failures++;
        if (cap != 8'd3)   failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
