// tb_feature_extract: 64x48 frames with drawn shapes, streamed with idle
// cycles. Frame A holds a rectangle, a far-away block that becomes a
// separate box and then is joined through the merge rule (its centre ends
// inside the grown first box), and a third separate rectangle. Frame B is
// empty. Boxes, sizes, centres and centroids are checked against values
// computed from the drawn pixels; frame_done must follow the last pixel
// within the post-processing bound.
module tb_feature_extract;
  import fd_pkg::*;
  localparam int W = 64, H = 48, N = 4, D = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  logic [10:0] in_x = 0, in_y = 0;
  obj_t [N-1:0] obj;
  logic frame_done;
  bit img [H][W];
  int checks = 0, failures = 0, eof_cyc = 0, cyc = 0, done_cnt = 0;
  feature_extract #(.W(W), .H(H), .NUM_OBJ(N), .DIST(D)) dut (.clk, .rst_n, .in_valid, .in_bit,
                                                              .in_x, .in_y, .obj, .frame_done);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && frame_done) begin
      done_cnt++;
      checks++;
      if (cyc - eof_cyc > 3 * N * (N - 1) / 2 + 2 * N * 34 + 10) begin
        failures++; $display("post-processing took %0d cycles", cyc - eof_cyc);
      end
    end
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic send_frame();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      if ($urandom_range(0, 4) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_bit = img[y][x]; in_x = 11'(x); in_y = 11'(y);
      if (x == W-1 && y == H-1) eof_cyc = cyc;
    end
    @(negedge clk); in_valid = 0;
  endtask
  task automatic fill(int x0, int x1, int y0, int y1);
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) img[y][x] = 1;
  endtask
  task automatic expect_obj(int i, int x0, int x1, int y0, int y1);
    longint sx, sy, n;
    sx = 0; sy = 0; n = 0;
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++)
      if (img[y][x]) begin sx += x; sy += y; n++; end
    checks++;
    if (!obj[i].valid || obj[i].xmin != 11'(x0) || obj[i].xmax != 11'(x1) || obj[i].ymin != 11'(y0) ||
        obj[i].ymax != 11'(y1) || obj[i].width != 11'(x1-x0+1) || obj[i].height != 11'(y1-y0+1) ||
        obj[i].mid_x != 11'((x0+x1)/2) || obj[i].mid_y != 11'((y0+y1)/2) ||
        obj[i].cent_x != 11'(sx/n) || obj[i].cent_y != 11'(sy/n)) begin
      failures++;
      $display("obj %0d: v%0d box %0d-%0d,%0d-%0d w%0d h%0d c%0d,%0d; exp %0d-%0d,%0d-%0d c%0d,%0d", i, obj[i].valid,
               obj[i].xmin, obj[i].xmax, obj[i].ymin, obj[i].ymax, obj[i].width, obj[i].height,
               obj[i].cent_x, obj[i].cent_y, x0, x1, y0, y1, sx/n, sy/n);
    end
  endtask
  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // frame A
    fill(10, 30, 5, 20);        // object 0
    fill(40, 42, 5, 6);         // starts as object 1 (more than D from object 0)
    fill(10, 42, 15, 15);       // bar joins object 0, which then holds object 1's centre
    fill(50, 60, 30, 40);       // separate object
    send_frame();
    wait (done_cnt == 1); @(negedge clk);
    expect_obj(0, 10, 42, 5, 20);
    checks++;
    if (obj[1].valid || obj[3].valid) begin failures++; $display("merged box still valid"); end
    expect_obj(2, 50, 60, 30, 40);
    // frame B: empty
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 0;
    send_frame();
    wait (done_cnt == 2); @(negedge clk);
    checks++;
    if (obj[0].valid || obj[1].valid || obj[2].valid || obj[3].valid) begin failures++; $display("empty frame has boxes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
