// tb_morph_process: three random 12x8 binary frames streamed in raster
// order with random idle cycles. Every output, in stream order, is checked
// against opening-closing with a 3x3 square computed from stored copies
// of the frames, together with its position.
module tb_morph_process;
  localparam int W = 12, H = 8, NF = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic [10:0] in_x = 0, in_y = 0;
  logic out_valid, out_bit;
  logic [10:0] out_x, out_y;
  bit frames [NF][H][W];
  int checks = 0, failures = 0, nout = 0;
  morph_process #(.W(W), .H(H), .K(3)) dut (.clk, .rst_n, .in_valid, .in_bit, .in_x, .in_y,
                                            .out_valid, .out_bit, .out_x, .out_y);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // reference: erode, dilate, dilate, erode with a 3x3 square, cells
  // outside the frame ignored
  bit stage [5][H][W];
  function automatic bit op(int s, int cx, int cy, bit dil);
    bit r;
    r = dil ? 0 : 1;
    for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
      if (cy+dy >= 0 && cy+dy < H && cx+dx >= 0 && cx+dx < W) begin
        if (dil) r = r | stage[s][cy+dy][cx+dx];
        else     r = r & stage[s][cy+dy][cx+dx];
      end
    return r;
  endfunction
  function automatic bit expect_bit(int f, int cx, int cy);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) stage[0][y][x] = frames[f][y][x];
    for (int s = 0; s < 4; s++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        stage[s+1][y][x] = op(s, x, y, (s == 1 || s == 2));
    return stage[4][cy][cx];
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
