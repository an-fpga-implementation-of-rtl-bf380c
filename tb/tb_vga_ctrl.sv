// tb_vga_ctrl: two full 640x480 frames at the default timing. Checks the
// line and frame lengths, the sync pulse widths, 307200 pixel requests per
// frame, the request coordinates, the test pulse from first to last pixel
// and the cycle count at the last pixel (479*800 + 639 = 383839).
module tb_vga_ctrl;
  logic clk = 0, rst_n = 0, en = 0;
  logic req, hs_n, vs_n, blank_n, frame_start, test_pulse;
  logic [10:0] x, y;
  logic [31:0] count_cycle, frame_cycles;
  int checks = 0, failures = 0;
  vga_ctrl dut (.clk, .rst_n, .en, .req, .x, .y, .hs_n, .vs_n, .blank_n, .frame_start,
                .test_pulse, .count_cycle, .frame_cycles);
  always #20 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    int nreq, nhs, nvs, ntp, cyc, fs_at[3], nfs, ex, ey, bad_xy, last_count;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    expect_eq("idle before enable", req, 0);
    @(negedge clk); en = 1;
    nreq = 0; nhs = 0; nvs = 0; ntp = 0; cyc = 0; nfs = 0; ex = 0; ey = 0; bad_xy = 0; last_count = -1;
    while (nfs < 3) begin
      @(negedge clk);
      if (frame_start) begin fs_at[nfs] = cyc; nfs++; end
      if (nfs == 1) begin
        if (req) begin
          if (x != 11'(ex) || y != 11'(ey)) bad_xy++;
          ex++; if (ex == 640) begin ex = 0; ey++; end
          nreq++;
        end
        if (!hs_n) nhs++;
        if (!vs_n) nvs++;
        if (test_pulse) ntp++;
        if (req && x == 639 && y == 479) last_count = count_cycle;
      end
      cyc++;
    end
    expect_eq("frame length", fs_at[1] - fs_at[0], 800 * 525);
    expect_eq("second frame length", fs_at[2] - fs_at[1], 800 * 525);
    expect_eq("requests per frame", nreq, 640 * 480);
    expect_eq("request coordinates", bad_xy, 0);
    expect_eq("hsync clocks per frame", nhs, 96 * 525);
    expect_eq("vsync clocks per frame", nvs, 2 * 800);
    expect_eq("test pulse length", ntp, 479 * 800 + 640);
    expect_eq("count at last pixel", last_count, 383839);
    expect_eq("frame_cycles", frame_cycles, 383839);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
