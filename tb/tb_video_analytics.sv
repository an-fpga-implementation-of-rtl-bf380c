// tb_video_analytics: the processing chain on 40x30 frames fed directly
// (incoming and background pixel pairs, gaps as in display timing).
// A standing figure with a shadow beside it, then the same figure lying,
// then still, then gone. Checks per processed frame: the bounding box of
// object 0 equals the drawn figure (the filters keep the extent of solid
// shapes at least 7 pixels wide), the shadow is not foreground in the mask
// memory while the figure is, and the fall state goes 0 -> 1 -> 2 -> 3 -> 0.
module tb_video_analytics;
  import fd_pkg::*;
  localparam int W = 40, H = 30, N = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, tick = 0, rd_bit, frame_done;
  logic [10:0] in_x = 0, in_y = 0, rd_x = 0, rd_y = 0;
  rgb_t in_new = '0, in_bg = '0;
  logic [9:0] ty = 40, tcr = 12, tcb = 12;
  obj_t [N-1:0] obj;
  fall_state_t [N-1:0] fstate;
  logic [N-1:0] fall_upd;
  int checks = 0, failures = 0, ndone = 0;
  video_analytics #(.W(W), .H(H), .NUM_OBJ(N), .DIST(8), .HIST(2), .INACT_SEC(1), .TICKS_PER_SEC(1)) dut (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_new, .in_bg, .ty, .tcr, .tcb, .tick, .rd_x, .rd_y,
    .rd_bit, .obj, .fstate, .frame_done, .fall_upd);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && frame_done) ndone++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic rgb_t bgpix(int x, int y);
    return '{10'(400 + (x % 7) * 3), 10'(410 + (y % 5) * 3), 10'(395 + ((x + y) % 3) * 4)};
  endfunction
  task automatic send_frame(bit fig, int x0, int x1, int y0, int y1, bit shadow);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        rgb_t b, c;
        b = bgpix(x, y); c = b;
        if (fig && x >= x0 && x <= x1 && y >= y0 && y <= y1) c = '{10'd900, 10'd700, 10'd300};
        else if (fig && shadow && x > x1 + 2 && x <= x1 + 12 && y >= y0 && y <= y1)
          c = '{10'(b.r * 6 / 10), 10'(b.g * 6 / 10), 10'(b.b * 6 / 10)};
        @(negedge clk); in_valid = 1; in_x = 11'(x); in_y = 11'(y); in_new = c; in_bg = b;
      end
      @(negedge clk); in_valid = 0;
      repeat (10) @(negedge clk);
    end
    repeat (40) @(negedge clk);
  endtask
  task automatic expect_frame(int k, bit fig, int x0, int x1, int y0, int y1, fall_state_t st);
    wait (ndone >= k + 1);
    repeat (40) @(negedge clk);      // fall state update follows frame_done
    checks++;
    if (fig && (!obj[0].valid || obj[0].xmin != 11'(x0) || obj[0].xmax != 11'(x1) ||
                obj[0].ymin != 11'(y0) || obj[0].ymax != 11'(y1) || obj[1].valid)) begin
      failures++; $display("frame %0d: box v%0d %0d-%0d,%0d-%0d", k, obj[0].valid, obj[0].xmin, obj[0].xmax, obj[0].ymin, obj[0].ymax);
    end
    if (!fig && obj[0].valid) begin failures++; $display("frame %0d: unexpected object", k); end
    checks++;
    if (fstate[0] != st) begin failures++; $display("frame %0d: state %0d expected %0d", k, fstate[0], st); end
  endtask
  task automatic expect_mask(int x, int y, bit v);
    @(negedge clk); rd_x = 11'(x); rd_y = 11'(y);
    @(negedge clk);
    checks++;
    if (rd_bit != v) begin failures++; $display("mask at %0d,%0d is %0d", x, y, rd_bit); end
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      begin
        send_frame(0, 0, 0, 0, 0, 0);
        for (int i = 0; i < 3; i++) send_frame(1, 10, 17, 4, 25, 1);
        send_frame(1, 8, 29, 18, 25, 0);
        send_frame(1, 8, 29, 18, 25, 0);
        @(negedge clk); tick = 1; @(negedge clk); tick = 0;
        @(negedge clk); tick = 1; @(negedge clk); tick = 0;
        send_frame(1, 8, 29, 18, 25, 0);
        send_frame(1, 8, 29, 18, 25, 0);
        send_frame(0, 0, 0, 0, 0, 0);
        send_frame(0, 0, 0, 0, 0, 0);
      end
      begin
        expect_frame(0, 0, 0, 0, 0, 0, S_NO_OBJ);
        expect_frame(1, 1, 10, 17, 4, 25, S_NORMAL);
        expect_frame(2, 1, 10, 17, 4, 25, S_NORMAL);
        expect_mask(13, 10, 1);
        expect_mask(24, 10, 0);
        expect_mask(2, 2, 0);
        expect_frame(4, 1, 8, 29, 18, 25, S_POSSIBLE);
        expect_frame(6, 1, 8, 29, 18, 25, S_CONFIRMED);
        expect_frame(8, 0, 0, 0, 0, 0, S_NO_OBJ);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
