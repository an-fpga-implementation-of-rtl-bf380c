// fall_detection_top: camera-to-display fall detection system.
// Clock domains: the sensor pixel clock (capture, Bayer-to-RGB, write side
// of the write FIFOs), the SDRAM clock (controller) and the 25 MHz display
// clock, which also paces all of the analytics: the display timing requests
// a pixel pair (incoming, background) from the frame buffers, the pair runs
// through the analytics pipeline, and the picture sent to the monitor is
// the camera image or the mask with the object boxes drawn in their fall
// colours. Each domain has its own synchronised reset; capture is held in
// reset until the SDRAM has finished its power-up sequence, so the first
// frame written is a whole one (this design's start-up rule). The sensor is
// expected to be configured already (2x skip and bin, RAW_W x RAW_H =
// 2*H_ACT x 2*V_ACT raw Bayer samples per frame). The SDRAM data bus is
// split into dq_o/dq_oe/dq_i; the pad is on the board level.
// Status: per-object fall state, the frame cycle count of the display
// timing (first to last pixel), and sticky FIFO overflow/underflow flags.
// Timing: the VGA outputs are delayed two clocks from the timing counters,
// matching the pixel path (buffer read, then display register).
module fall_detection_top
  import fd_pkg::*;
#(
  parameter int H_ACT         = 640,
  parameter int V_ACT         = 480,
  parameter int H_FP          = 16,
  parameter int H_SYN         = 96,
  parameter int H_BP          = 48,
  parameter int V_FP          = 10,
  parameter int V_SYN         = 2,
  parameter int V_BP          = 33,
  parameter int NUM_OBJ       = 4,
  parameter int DIST          = 16,
  parameter int CLK_HZ        = 25_000_000,
  parameter int TICKS_PER_SEC = 10,
  parameter int HIST          = 60,
  parameter int INACT_SEC     = 6,
  parameter int FIFO_AW       = 9,
  parameter int BURST         = 16,
  parameter int REF_CYC       = 780,
  parameter int INIT_CYC      = 20000
) (
  input  logic                       rst_n,
  // CMOS sensor
  input  logic                       cam_pixclk,
  input  logic                       cam_fval,
  input  logic                       cam_lval,
  input  logic [9:0]                 cam_data,
  // SDRAM
  input  logic                       sd_clk,
  output logic                       sdram_cs_n,
  output logic                       sdram_ras_n,
  output logic                       sdram_cas_n,
  output logic                       sdram_we_n,
  output logic [1:0]                 sdram_ba,
  output logic [12:0]                sdram_addr,
  output logic [3:0]                 sdram_dqm,
  output logic [31:0]                sdram_dq_o,
  output logic                       sdram_dq_oe,
  input  logic [31:0]                sdram_dq_i,
  // user controlled input (display clock domain, already debounced)
  input  logic                       vga_clk,
  input  logic                       key_bg_capture,
  input  logic [1:0]                 sw_thr_sel,
  input  logic                       key_thr_inc,
  input  logic                       key_thr_dec,
  input  logic                       sw_show_mask,
  // VGA
  output logic [9:0]                 vga_r,
  output logic [9:0]                 vga_g,
  output logic [9:0]                 vga_b,
  output logic                       vga_hs_n,
  output logic                       vga_vs_n,
  output logic                       vga_blank_n,
  // status
  output fall_state_t [NUM_OBJ-1:0]  fall_state,
  output obj_t        [NUM_OBJ-1:0]  objects,
  output logic                       frame_done,
  output logic                       test_pulse,
  output logic [31:0]                frame_cycles,
  output logic                       wr_overflow,
  output logic                       rd_underflow
);
  // ---------------- resets ----------------
  logic [1:0] cam_rs, sd_rs, vga_rs;
  logic       cam_rst_n, sd_rst_n, vga_rst_n;
  always_ff @(posedge cam_pixclk or negedge rst_n)
    if (!rst_n) cam_rs <= 2'b00; else cam_rs <= {cam_rs[0], 1'b1};
  always_ff @(posedge sd_clk or negedge rst_n)
    if (!rst_n) sd_rs <= 2'b00; else sd_rs <= {sd_rs[0], 1'b1};
  always_ff @(posedge vga_clk or negedge rst_n)
    if (!rst_n) vga_rs <= 2'b00; else vga_rs <= {vga_rs[0], 1'b1};
  assign cam_rst_n = cam_rs[1];
  assign sd_rst_n  = sd_rs[1];
  assign vga_rst_n = vga_rs[1];

  // ---------------- camera domain ----------------
  // capture is held in reset until the SDRAM has finished its power-up
  // sequence; it then starts with the next whole frame
  logic        buf_ready, cap_rst_n;
  logic        bg_s1, bg_s2;
  logic        raw_valid, bg_frame, rgb_valid, rgb_bg;
  logic [10:0] raw_x, raw_y;
  logic [9:0]  raw;
  rgb_t        rgb;

  always_ff @(posedge cam_pixclk or negedge cam_rst_n) begin
    if (!cam_rst_n) begin
      bg_s1 <= 1'b0; bg_s2 <= 1'b0; cap_rst_n <= 1'b0;
    end else begin
      bg_s1 <= key_bg_capture;
      bg_s2 <= bg_s1;
      cap_rst_n <= buf_ready;
    end
  end

  image_capture #(.RAW_W(2*H_ACT), .RAW_H(2*V_ACT)) u_capture (
    .clk(cam_pixclk), .rst_n(cap_rst_n), .fval(cam_fval), .lval(cam_lval), .data(cam_data),
    .bg_req(bg_s2), .raw_valid, .raw_x, .raw_y, .raw, .bg_frame, .frame_count());

  raw2rgb #(.RAW_W(2*H_ACT)) u_raw2rgb (
    .clk(cam_pixclk), .rst_n(cap_rst_n), .raw_valid, .raw_x, .raw_y, .raw,
    .bg_frame_in(bg_frame), .rgb_valid, .rgb, .bg_frame_out(rgb_bg));

  // ---------------- frame buffers ----------------
  logic video_ready, req, rd_valid;
  rgb_t rd_new, rd_bg;

  image_buffer #(.AW(FIFO_AW), .BURST(BURST), .REF_CYC(REF_CYC), .INIT_CYC(INIT_CYC),
                 .FRAME_WORDS(H_ACT * V_ACT)) u_buffer (
    .cam_clk(cam_pixclk), .cam_rst_n, .pix_valid(rgb_valid), .pix(rgb), .pix_bg(rgb_bg),
    .wr_overflow, .wr_ready(buf_ready),
    .sd_clk, .sd_rst_n, .sdram_cs_n, .sdram_ras_n, .sdram_cas_n, .sdram_we_n, .sdram_ba,
    .sdram_addr, .sdram_dqm, .sdram_dq_o, .sdram_dq_oe, .sdram_dq_i,
    .vga_clk, .vga_rst_n, .rd_req(req), .rd_valid, .rd_new, .rd_bg, .video_ready, .rd_underflow);

  // ---------------- display domain ----------------
  logic [10:0] vx, vy, px, py;
  logic        hs0, vs0, bl0;
  logic [1:0]  hs_d, vs_d, bl_d;
  logic [9:0]  ty, tcr, tcb;
  logic        tick, mask_bit;
  rgb_t        pix_out;

  vga_ctrl #(.H_ACT(H_ACT), .H_FP(H_FP), .H_SYN(H_SYN), .H_BP(H_BP),
             .V_ACT(V_ACT), .V_FP(V_FP), .V_SYN(V_SYN), .V_BP(V_BP)) u_vga (
    .clk(vga_clk), .rst_n(vga_rst_n), .en(video_ready), .req, .x(vx), .y(vy),
    .hs_n(hs0), .vs_n(vs0), .blank_n(bl0), .frame_start(), .test_pulse,
    .count_cycle(), .frame_cycles);

  threshold_adjust u_thr (
    .clk(vga_clk), .rst_n(vga_rst_n), .sel(sw_thr_sel), .inc(key_thr_inc), .dec(key_thr_dec),
    .ty, .tcr, .tcb);

  sec_timer #(.CLK_HZ(CLK_HZ), .TICKS_PER_SEC(TICKS_PER_SEC)) u_timer (
    .clk(vga_clk), .rst_n(vga_rst_n), .tick);

  always_ff @(posedge vga_clk or negedge vga_rst_n) begin
    if (!vga_rst_n) begin
      px <= '0; py <= '0; hs_d <= '1; vs_d <= '1; bl_d <= '0;
    end else begin
      px   <= vx;
      py   <= vy;
      hs_d <= {hs_d[0], hs0};
      vs_d <= {vs_d[0], vs0};
      bl_d <= {bl_d[0], bl0 && video_ready};
    end
  end

  video_analytics #(.W(H_ACT), .H(V_ACT), .NUM_OBJ(NUM_OBJ), .DIST(DIST), .HIST(HIST),
                    .INACT_SEC(INACT_SEC), .TICKS_PER_SEC(TICKS_PER_SEC)) u_va (
    .clk(vga_clk), .rst_n(vga_rst_n), .in_valid(rd_valid), .in_x(px), .in_y(py),
    .in_new(rd_new), .in_bg(rd_bg), .ty, .tcr, .tcb, .tick,
    .rd_x(vx), .rd_y(vy), .rd_bit(mask_bit), .obj(objects), .fstate(fall_state),
    .frame_done, .fall_upd());

  display_mux #(.NUM_OBJ(NUM_OBJ)) u_mux (
    .clk(vga_clk), .mode(sw_show_mask), .x(px), .y(py), .cam(rd_new), .mask(mask_bit),
    .obj(objects), .st(fall_state), .pix(pix_out));

  assign vga_r       = pix_out.r;
  assign vga_g       = pix_out.g;
  assign vga_b       = pix_out.b;
  assign vga_hs_n    = hs_d[1];
  assign vga_vs_n    = vs_d[1];
  assign vga_blank_n = bl_d[1];
endmodule
