// tb_median_filter: three random 12x8 binary frames streamed in raster
// order with random idle cycles. Every output, in stream order, is checked
// against a 5x5 majority (outside cells count 0) computed from stored
// copies of the frames, together with its position.
module tb_median_filter;
  localparam int W = 12, H = 8, K = 5, R = 2, NF = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic [10:0] in_x = 0, in_y = 0;
  logic out_valid, out_bit;
  logic [10:0] out_x, out_y;
  bit frames [NF][H][W];
  int checks = 0, failures = 0, nout = 0;
  median_filter #(.W(W), .H(H), .K(K)) dut (.clk, .rst_n, .in_valid, .in_bit, .in_x, .in_y,
                                            .out_valid, .out_bit, .out_x, .out_y);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic bit expect_bit(int f, int cx, int cy);
    int c;
    c = 0;
    for (int dy = -R; dy <= R; dy++) for (int dx = -R; dx <= R; dx++)
      if (cy+dy >= 0 && cy+dy < H && cx+dx >= 0 && cx+dx < W) c += frames[f][cy+dy][cx+dx];
    return c >= (K*K+1)/2;
  endfunction
  always @(posedge clk) begin
    if (out_valid && nout < (NF-1)*W*H) begin
      int f, p, ex, ey;
      f = nout / (W*H); p = nout % (W*H); ex = p % W; ey = p / W;
      checks++;
      if (out_x != 11'(ex) || out_y != 11'(ey) || out_bit != expect_bit(f, ex, ey)) begin
        failures++;
        $display("mismatch #%0d at %0d,%0d (exp %0d,%0d) bit %0d", nout, out_x, out_y, ex, ey, out_bit);
      end
      nout++;
    end
  end
  initial begin
    for (int f = 0; f < NF; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      frames[f][y][x] = ($urandom_range(0, 99) < 45);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < NF; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_bit = frames[f][y][x]; in_x = 11'(x); in_y = 11'(y);
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != (NF-1)*W*H) begin failures++; $display("only %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
