// tb_image_capture: a 16x10 raw sensor. Reset is released in the middle of
// a frame, which must be skipped; the following frames must give every
// sample once with its raw column and row, the first complete frame must
// be marked as background, then none until a capture request, after which
// exactly the next frame is marked. A second instance, set for a window
// two columns and two rows smaller than the sensor sends, must drop the
// extra samples.
module tb_image_capture;
  localparam int RW = 16, RH = 10;
  logic clk = 0, rst_n = 0, bg_req = 0;
  logic fval, lval, raw_valid, bg_frame;
  logic [9:0] data, raw;
  logic [10:0] raw_x, raw_y;
  logic [15:0] frame_count;
  int frames, checks = 0, failures = 0, nsamp = 0, nbgs = 0;
  int bg_of_frame [8];
  cmos_sensor_model #(.RAW_W(RW), .RAW_H(RH), .H_BLANK(3), .V_BLANK(9)) cam (
    .clk, .run(1'b1), .obj_en(1'b0), .obj_x0(0), .obj_x1(0), .obj_y0(0), .obj_y1(0),
    .shadow_en(1'b0), .shadow_x0(0), .shadow_x1(0), .fval, .lval, .data, .frames);
  image_capture #(.RAW_W(RW), .RAW_H(RH)) dut (.clk, .rst_n, .fval, .lval, .data, .bg_req,
    .raw_valid, .raw_x, .raw_y, .raw, .bg_frame, .frame_count);
  logic        c_valid, c_bg;
  logic [9:0]  c_raw;
  logic [10:0] c_x, c_y;
  int          c_samp = 0, c_bad = 0;
  image_capture #(.RAW_W(RW - 2), .RAW_H(RH - 2)) dut_crop (.clk, .rst_n, .fval, .lval, .data,
    .bg_req, .raw_valid(c_valid), .raw_x(c_x), .raw_y(c_y), .raw(c_raw), .bg_frame(c_bg), .frame_count());
  always @(posedge clk) if (rst_n && c_valid) begin
    c_samp++;
    if (c_x >= 11'(RW - 2) || c_y >= 11'(RH - 2) || c_raw != sample(int'(c_x), int'(c_y))) c_bad++;
  end
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // expected sample value from the same scene rule
  function automatic logic [9:0] sample(int x, int y);
    logic [29:0] c;
    c = cam.scene(x / 2, y / 2, 0, 0, 0, 0, 0, 0, 0, 0);
    if (y % 2 == 0) return (x % 2 == 0) ? c[19:10] : c[29:20];
    return (x % 2 == 0) ? c[9:0] : c[19:10];
  endfunction
  int ex = 0, ey = 0, fidx = 0;
  always @(posedge clk) if (rst_n && raw_valid) begin
    checks++;
    if (raw_x != 11'(ex) || raw_y != 11'(ey) || raw != sample(ex, ey)) begin
      failures++; $display("sample %0d,%0d: got %0d,%0d = %0d", ex, ey, raw_x, raw_y, raw);
    end
    if (ex == 0 && ey == 0) bg_of_frame[fidx] = bg_frame;
    nsamp++;
    ex++;
    if (ex == RW) begin ex = 0; ey++; end
    if (ey == RH) begin ey = 0; fidx++; end
  end
  initial begin
    wait (frames == 0 && fval && cam.lval);
    repeat (RW + 5) @(posedge clk);          // middle of the first frame
    rst_n = 1;
    wait (frames == 3);
    @(negedge clk); bg_req = 1; @(negedge clk); bg_req = 0;
    wait (frames == 6);
    repeat (5) @(posedge clk);
    checks++;
    if (nsamp != 5 * RW * RH) begin failures++; $display("%0d samples", nsamp); end
    checks++;
    if (bg_of_frame[0] != 1 || bg_of_frame[1] != 0 || bg_of_frame[2] != 1 || bg_of_frame[3] != 0 || bg_of_frame[4] != 0) begin
      failures++; $display("background marks %0d %0d %0d %0d %0d", bg_of_frame[0], bg_of_frame[1], bg_of_frame[2], bg_of_frame[3], bg_of_frame[4]);
    end
    checks++;
    if (c_samp != 5 * (RW - 2) * (RH - 2) || c_bad != 0) begin
      failures++; $display("cropped instance: %0d samples, %0d wrong", c_samp, c_bad);
    end
    checks++;
    if (frame_count != 16'd5) begin failures++; $display("frame_count %0d", frame_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
