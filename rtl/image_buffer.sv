// image_buffer: frame buffering between camera and processing.
// RGB pixels from the camera side are packed into 32-bit words (30 bits of
// colour) and pushed into write FIFO 0 (incoming frame) and, while a
// background frame is being captured, also into write FIFO 1 (background
// model). The SDRAM controller moves bursts from the write FIFOs into the two
// frame buffers and from the frame buffers into read FIFOs 0 and 1. The
// display side pops both read FIFOs together with rd_req, so the incoming
// pixel and the background pixel of the same position arrive side by side,
// registered, one clock after the request. Splitting the frames over two
// port pairs of 32 bits follows the source; FIFO depth and the start-up rule
// are this design's: `video_ready` rises (and stays high) once the SDRAM is
// initialised and both read FIFOs hold at least half their depth, and the
// display must not request pixels before that. `wr_ready` is the end of the
// SDRAM power-up sequence seen in the camera domain; the camera side must
// not push pixels before it (the write FIFOs cannot hold the frames that
// arrive during the 200 us wait). Overflow and underflow are
// reported as sticky flags in their own clock domains.
module image_buffer
  import fd_pkg::*;
#(
  parameter int          AW          = 9,
  parameter int          BURST       = 16,
  parameter int          REF_CYC     = 780,
  parameter int          INIT_CYC    = 20000,
  parameter int unsigned FRAME_WORDS = 307200
) (
  // camera side
  input  logic        cam_clk,
  input  logic        cam_rst_n,
  input  logic        pix_valid,
  input  rgb_t        pix,
  input  logic        pix_bg,
  output logic        wr_overflow,
  output logic        wr_ready,
  // SDRAM side
  input  logic        sd_clk,
  input  logic        sd_rst_n,
  output logic        sdram_cs_n,
  output logic        sdram_ras_n,
  output logic        sdram_cas_n,
  output logic        sdram_we_n,
  output logic [1:0]  sdram_ba,
  output logic [12:0] sdram_addr,
  output logic [3:0]  sdram_dqm,
  output logic [31:0] sdram_dq_o,
  output logic        sdram_dq_oe,
  input  logic [31:0] sdram_dq_i,
  // display side
  input  logic        vga_clk,
  input  logic        vga_rst_n,
  input  logic        rd_req,
  output logic        rd_valid,
  output rgb_t        rd_new,
  output rgb_t        rd_bg,
  output logic        video_ready,
  output logic        rd_underflow
);
  localparam int FCW = AW + 1;

  logic [1:0]          wf_full, wf_empty, rf_full, rf_empty;
  logic [1:0][FCW-1:0]  wf_wcnt, wf_rcnt, rf_wcnt, rf_rcnt;
  logic [1:0][31:0]    wf_rdata, rf_rdata;
  logic [1:0]          wf_pop, rf_push, wf_push;
  logic [31:0]         sd_rdata;
  logic [1:0][FCW-1:0]  rd_space;
  logic                init_done;

  assign wf_push[0] = pix_valid;
  assign wf_push[1] = pix_valid && pix_bg;

  for (genvar i = 0; i < 2; i++) begin : g_fifo
    async_fifo #(.DW(32), .AW(AW)) u_wfifo (
      .wclk(cam_clk), .wrst_n(cam_rst_n), .wr_en(wf_push[i]), .wdata({2'b00, pix}),
      .full(wf_full[i]), .wr_count(wf_wcnt[i]),
      .rclk(sd_clk), .rrst_n(sd_rst_n), .rd_en(wf_pop[i]), .rdata(wf_rdata[i]),
      .empty(wf_empty[i]), .rd_count(wf_rcnt[i]));
    async_fifo #(.DW(32), .AW(AW)) u_rfifo (
      .wclk(sd_clk), .wrst_n(sd_rst_n), .wr_en(rf_push[i]), .wdata(sd_rdata),
      .full(rf_full[i]), .wr_count(rf_wcnt[i]),
      .rclk(vga_clk), .rrst_n(vga_rst_n), .rd_en(rd_req), .rdata(rf_rdata[i]),
      .empty(rf_empty[i]), .rd_count(rf_rcnt[i]));
    assign rd_space[i] = FCW'(2**AW) - rf_wcnt[i];
  end

  sdram_ctrl #(.CNT_W(FCW), .BURST(BURST), .REF_CYC(REF_CYC), .INIT_CYC(INIT_CYC),
               .FRAME_WORDS(FRAME_WORDS)) u_sdram_ctrl (
    .clk(sd_clk), .rst_n(sd_rst_n),
    .wr_avail(wf_rcnt), .wr_data(wf_rdata), .wr_pop(wf_pop),
    .rd_space(rd_space), .rd_push(rf_push), .rd_data(sd_rdata), .init_done(init_done),
    .sdram_cs_n, .sdram_ras_n, .sdram_cas_n, .sdram_we_n, .sdram_ba, .sdram_addr,
    .sdram_dqm, .sdram_dq_o, .sdram_dq_oe, .sdram_dq_i);

  // camera side: overflow flag, SDRAM ready
  logic cinit_s1;
  always_ff @(posedge cam_clk or negedge cam_rst_n) begin
    if (!cam_rst_n) begin
      wr_overflow <= 1'b0; cinit_s1 <= 1'b0; wr_ready <= 1'b0;
    end else begin
      cinit_s1 <= init_done;
      wr_ready <= cinit_s1;
      if ((wf_push[0] && wf_full[0]) || (wf_push[1] && wf_full[1])) wr_overflow <= 1'b1;
    end
  end

  // display side: start rule, registered read data, underflow flag
  logic init_s1, init_s2;
  always_ff @(posedge vga_clk or negedge vga_rst_n) begin
    if (!vga_rst_n) begin
      init_s1 <= 1'b0; init_s2 <= 1'b0; video_ready <= 1'b0; rd_underflow <= 1'b0;
      rd_valid <= 1'b0; rd_new <= '0; rd_bg <= '0;
    end else begin
      init_s1 <= init_done;
      init_s2 <= init_s1;
      if (init_s2 && rf_rcnt[0] >= FCW'(2**(AW-1)) && rf_rcnt[1] >= FCW'(2**(AW-1)))
        video_ready <= 1'b1;
      if (rd_req && (rf_empty[0] || rf_empty[1])) rd_underflow <= 1'b1;
      rd_valid <= rd_req;
      if (rd_req) begin
        rd_new <= rf_rdata[0][29:0];
        rd_bg  <= rf_rdata[1][29:0];
      end
    end
  end
endmodule
