// tb_raw2rgb: random raw frames of 20x8 samples (with idle cycles) are
// fed in; every 2x2 quad must give one pixel R = top-right, B = bottom-left,
// G = mean of top-left and bottom-right, in raster order of the quads.
module tb_raw2rgb;
  import fd_pkg::*;
  localparam int RW = 20, RH = 8;
  logic clk = 0, rst_n = 0, raw_valid = 0, bg_in = 0, rgb_valid, bg_out;
  logic [10:0] raw_x = 0, raw_y = 0;
  logic [9:0] raw = 0;
  rgb_t rgb;
  logic [9:0] img [RH][RW];
  int checks = 0, failures = 0, n = 0, frame = 0;
  raw2rgb #(.RAW_W(RW)) dut (.clk, .rst_n, .raw_valid, .raw_x, .raw_y, .raw, .bg_frame_in(bg_in),
                             .rgb_valid, .rgb, .bg_frame_out(bg_out));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && rgb_valid) begin
    int qx, qy;
    logic [10:0] g;
    qx = n % (RW / 2); qy = n / (RW / 2);
    g = (11'(img[2*qy][2*qx]) + 11'(img[2*qy+1][2*qx+1])) >> 1;
    checks++;
    if (rgb.r != img[2*qy][2*qx+1] || rgb.b != img[2*qy+1][2*qx] || rgb.g != g[9:0] || bg_out != frame[0]) begin
      failures++; $display("quad %0d,%0d: got %0d %0d %0d", qx, qy, rgb.r, rgb.g, rgb.b);
    end
    n++;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (frame = 0; frame < 3; frame++) begin
      for (int y = 0; y < RH; y++) for (int x = 0; x < RW; x++) img[y][x] = 10'($urandom);
      n = 0;
      for (int y = 0; y < RH; y++) for (int x = 0; x < RW; x++) begin
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); raw_valid = 0; end
        @(negedge clk);
        raw_valid = 1; raw_x = 11'(x); raw_y = 11'(y); raw = img[y][x]; bg_in = frame[0];
      end
      @(negedge clk); raw_valid = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (n != RW * RH / 4) begin failures++; $display("%0d pixels", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
