// tb_image_buffer: camera (20 ns), SDRAM (8 ns) and display (40 ns)
// clocks with 16x8-pixel frames, 32-deep FIFOs and bursts of 8. The
// camera writes frames whose words carry {frame number, pixel index}; only
// frame 0 is a background frame. After the first display frame (which may
// hold prefetched words from before the camera wrote anything), every
// incoming word must carry the right pixel index from a later frame and
// every background word must be frame 0's word; no FIFO may overflow or run
// dry, and data must arrive one clock after each request.
module tb_image_buffer;
  import fd_pkg::*;
  localparam int W = 16, H = 8, F = W * H;
  logic cam_clk = 0, sd_clk = 0, vga_clk = 0, rst_n = 1;
  logic pix_valid = 0, pix_bg = 0, wr_overflow, wr_ready, rd_req = 0, rd_valid, video_ready, rd_underflow;
  rgb_t pix = '0, rd_new, rd_bg;
  logic cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [12:0] addr;
  logic [3:0] dqm;
  logic [31:0] dq_o, dq_i;
  int checks = 0, failures = 0, cam_frames = 0, nread = 0;
  image_buffer #(.AW(5), .BURST(8), .REF_CYC(100), .INIT_CYC(50), .FRAME_WORDS(F)) dut (
    .cam_clk, .cam_rst_n(rst_n), .pix_valid, .pix, .pix_bg, .wr_overflow, .wr_ready,
    .sd_clk, .sd_rst_n(rst_n), .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n),
    .sdram_we_n(we_n), .sdram_ba(ba), .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o),
    .sdram_dq_oe(dq_oe), .sdram_dq_i(dq_i),
    .vga_clk, .vga_rst_n(rst_n), .rd_req, .rd_valid, .rd_new, .rd_bg, .video_ready, .rd_underflow);
  sdram_model mdl (.clk(sd_clk), .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dq_o, .dq_oe, .dq_i);
  always #10 cam_clk = ~cam_clk;
  always #4 sd_clk = ~sd_clk;
  always #20 vga_clk = ~vga_clk;
  initial #1 rst_n = 0;
  initial begin
    #3000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // camera: one pixel every other clock on a line, blank between lines/frames
  initial begin
    #200;
    forever begin
      for (int i = 0; i < F; i++) begin
        @(negedge cam_clk); pix_valid = 1; pix_bg = (cam_frames == 0); pix = rgb_t'({8'(cam_frames), 22'(i)});
        @(negedge cam_clk); pix_valid = 0;
        if (i % W == W - 1) repeat (10) @(negedge cam_clk);
      end
      cam_frames++;
      repeat (40) @(negedge cam_clk);
    end
  end
  // display: W requests per line, gaps between lines and frames
  int req_q = 0;
  initial begin
    #200; rst_n = 1;  // reset pulse from #1 to #200
    wait (video_ready && cam_frames >= 1);
    for (int f = 0; f < 4; f++) begin
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin @(negedge vga_clk); rd_req = 1; end
        @(negedge vga_clk); rd_req = 0;
        repeat (6) @(negedge vga_clk);
      end
      repeat (20) @(negedge vga_clk);
    end
    repeat (5) @(negedge vga_clk);
    checks++;
    if (nread != 4 * F || wr_overflow || rd_underflow) begin
      failures++; $display("reads %0d overflow %0d underflow %0d", nread, wr_overflow, rd_underflow);
    end
    checks++;
    if (!wr_ready) begin failures++; $display("wr_ready never rose"); end
    checks++;
    if (mdl.errors != 0) begin failures++; $display("sdram protocol errors %0d", mdl.errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic req_d = 0;
  always @(posedge vga_clk) if (rst_n) begin
    checks++;
    if (rd_valid != req_d) begin failures++; $display("rd_valid not one clock after request"); end
    req_d <= rd_req;
    if (rd_valid) begin
      if (nread >= F) begin
        checks++;
        if (rd_new[21:0] != 22'(nread % F) || rd_bg != rgb_t'({8'd0, 22'(nread % F)})) begin
          failures++; $display("read %0d: new %h bg %h", nread, rd_new, rd_bg);
        end
      end
      nread++;
    end
  end
endmodule
