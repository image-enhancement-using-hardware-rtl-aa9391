// tb_range_highlight: self-check of the range highlighting transform.
//
// Sweeps every gray level with the bounds 100 and 180, then applies random
// pixels with random bounds. The expected value is the pixel itself when
// lo < x < hi and 1 otherwise; the in-range flag must agree. Counts pixels
// inside and outside the band and fails if either never occurred.
module tb_range_highlight;
  import enh_pkg::*;

  logic   clk = 1'b0;
  pixel_t pix, lo, hi;
  pixel_t out;
  logic   inr;
  int     checks = 0, failures = 0, n_in = 0, n_out = 0;

  always #5 clk = ~clk;

  range_highlight dut (.pix_i(pix), .lo_i(lo), .hi_i(hi), .pix_o(out), .in_range_o(inr));

  task automatic apply(int x, int l, int h);
    int  want;
    bit  in_band;
    @(negedge clk);
    pix = pixel_t'(x);
    lo  = pixel_t'(l);
    hi  = pixel_t'(h);
    #1;
    in_band = (x > l) && (x < h);
    want    = in_band ? x : 1;
    checks += 2;
    if (int'(out) != want) begin
      failures++; $display("x=%0d lo=%0d hi=%0d got %0d want %0d", x, l, h, out, want);
    end
    if (inr != in_band) begin
      failures++; $display("x=%0d lo=%0d hi=%0d flag %0b", x, l, h, inr);
    end
    if (in_band) n_in++; else n_out++;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) apply(x, 100, 180);
    checks++;
    if (n_in != 79) failures++;  // 101..179
    for (int i = 0; i < 1000; i++)
      apply(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(255)));
    $display("inside band %0d, outside %0d", n_in, n_out);
    checks++;
    if (n_in == 0 || n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
