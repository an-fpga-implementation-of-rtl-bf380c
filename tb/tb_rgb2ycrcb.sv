// tb_rgb2ycrcb: random RGB pixels against the real-valued conversion
// equations; Y must be within 1.5 and Cr/Cb within 2 of the exact values
// (fixed-point coefficients and truncation), with one clock of latency.
module tb_rgb2ycrcb;
  import fd_pkg::*;
  logic clk = 0;
  rgb_t rgb;
  ycc_t ycc;
  int checks = 0, failures = 0;
  rgb2ycrcb dut (.clk, .rgb, .ycc);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int s11(logic [10:0] v);
    return v[10] ? int'(v) - 2048 : int'(v);
  endfunction
  initial begin
    real y, cr, cb;
    for (int n = 0; n < 2000; n++) begin
      rgb.r = 10'($urandom); rgb.g = 10'($urandom); rgb.b = 10'($urandom);
      if (n == 0) rgb = '{10'h3FF, 10'h3FF, 10'h3FF};
      if (n == 1) rgb = '{10'h3FF, 10'h0, 10'h0};
      y  = 0.299 * rgb.r + 0.587 * rgb.g + 0.114 * rgb.b;
      cr = 0.713 * (rgb.r - y);
      cb = 0.565 * (rgb.b - y);
      @(posedge clk); #1;
      checks++;
      if ((real'(ycc.y) - y) > 1.5 || (y - real'(ycc.y)) > 1.5 ||
          (real'(s11(ycc[21:11])) - cr) > 2.0 || (cr - real'(s11(ycc[21:11]))) > 2.0 ||
          (real'(s11(ycc[10:0])) - cb) > 2.0 || (cb - real'(s11(ycc[10:0]))) > 2.0) begin
        failures++;
        $display("mismatch rgb=%0d,%0d,%0d got %0d,%0d,%0d exp %f,%f,%f", rgb.r, rgb.g, rgb.b,
                 ycc.y, s11(ycc[21:11]), s11(ycc[10:0]), y, cr, cb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
