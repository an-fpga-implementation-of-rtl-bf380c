// tb_async_fifo: 32-bit FIFO, depth 16, written at 10 ns and read at 17 ns
// with random enables. Every word read must be the next one written;
// a write when full and a read when empty must be ignored; the fill counts
// must never exceed the depth, and the FIFO must end empty.
module tb_async_fifo;
  localparam int AW = 4;
  logic wclk = 0, rclk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  logic [AW:0] wr_count, rd_count;
  int checks = 0, failures = 0, nw = 0, nr = 0, full_seen = 0, empty_seen = 0;
  async_fifo #(.DW(32), .AW(AW)) dut (.wclk, .wrst_n(rst_n), .wr_en, .wdata, .full, .wr_count,
                                      .rclk, .rrst_n(rst_n), .rd_en, .rdata, .empty, .rd_count);
  always #5 wclk = ~wclk;
  always #8.5 rclk = ~rclk;
  localparam int TOTAL = 3000;
  initial begin
    #2000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // Stimulus and checks at the falling edges, where full/empty/rdata are
  // stable until the next rising edge. Written value: n * 2654435761.
  always @(negedge wclk) if (rst_n) begin
    wr_en = (nw < TOTAL) && ($urandom_range(0, 99) < ((nw / 500) % 2 ? 90 : 40));
    wdata = nw * 32'd2654435761;
    if (wr_en && full) full_seen++;
    if (wr_en && !full) nw++;
    if (wr_count > 16) begin failures++; $display("write count over depth"); end
  end
  always @(negedge rclk) if (rst_n) begin
    rd_en = $urandom_range(0, 99) < ((nr / 700) % 2 ? 30 : 85);
    if (rd_en && empty) empty_seen++;
    if (rd_en && !empty) begin
      checks++;
      if (rdata != nr * 32'd2654435761) begin failures++; $display("read %0d got %h", nr, rdata); end
      nr++;
    end
    if (rd_count > 16) begin failures++; $display("read count over depth"); end
  end
  initial begin
    #100; rst_n = 1;
    wait (nr == TOTAL);
    #500;
    checks++;
    if (!empty || full_seen == 0 || empty_seen == 0) begin
      failures++; $display("end: empty %0d full seen %0d empty seen %0d", empty, full_seen, empty_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
