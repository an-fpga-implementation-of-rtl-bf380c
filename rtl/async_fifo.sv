// async_fifo: dual-clock FIFO used as the write FIFOs (camera -> SDRAM)
// and read FIFOs (SDRAM -> display) of the image buffer.
// Depth 2**AW words of DW bits. Write and read pointers are kept in binary
// and Gray code; the Gray pointers cross into the other clock domain through
// two-flop synchronisers, so full/empty and the fill counts are conservative.
// The read side is first-word-fall-through: rdata shows the oldest word
// whenever empty is low, and rd_en pops it. wr_count is the fill level seen
// from the write side, rd_count the fill level seen from the read side.
// Writes when full and reads when empty are ignored.
module async_fifo #(
  parameter int DW = 32,
  parameter int AW = 9
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  output logic [AW:0]   wr_count,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   rd_count
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  logic [AW:0] wbin_n;
  assign wbin_n   = wbin + 1'b1;
  assign wr_count = wbin - g2b(rgray_w2);
  assign full     = (wr_count == (AW+1)'(2**AW));

  always_ff @(posedge wclk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= wbin_n ^ (wbin_n >> 1);
      end
    end
  end

  // read domain
  logic [AW:0] rbin_n;
  assign rbin_n   = rbin + 1'b1;
  assign rd_count = g2b(wgray_r2) - rbin;
  assign empty    = (rd_count == '0);
  assign rdata    = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin_n;
        rgray <= rbin_n ^ (rbin_n >> 1);
      end
    end
  end
endmodule
