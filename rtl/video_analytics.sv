// video_analytics: the per-pixel processing pipeline.
// Each incoming pixel and the background pixel of the same position enter
// together (`in_valid`, position in_x/in_y). Both are converted to YCrCb,
// background subtraction with shadow reduction gives a foreground bit, a
// 5x5 median filter removes noise, opening-closing refines the silhouette,
// and the final mask bit is written to the on-chip mask memory and fed to
// feature extraction. After every frame the object features go to one fall
// detector per object slot. Every stage hands a pixel on as soon as it is
// done with it, so the delay through the chain is a few lines, not a frame.
// Latency: two clocks through colour conversion and subtraction, then
// 2 lines + 2 pixels (median) and 4 x (1 line + 1 pixel) (morphology) in
// stream order. The display reads the mask through rd_x/rd_y (one clock).
module video_analytics
  import fd_pkg::*;
#(
  parameter int W             = 640,
  parameter int H             = 480,
  parameter int MED_K         = 5,
  parameter int MORPH_K       = 3,
  parameter int NUM_OBJ       = 4,
  parameter int DIST          = 16,
  parameter int HIST          = 60,
  parameter int INACT_SEC     = 6,
  parameter int TICKS_PER_SEC = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [10:0]                in_x,
  input  logic [10:0]                in_y,
  input  rgb_t                       in_new,
  input  rgb_t                       in_bg,
  input  logic [9:0]                 ty,
  input  logic [9:0]                 tcr,
  input  logic [9:0]                 tcb,
  input  logic                       tick,
  input  logic [10:0]                rd_x,
  input  logic [10:0]                rd_y,
  output logic                       rd_bit,
  output obj_t        [NUM_OBJ-1:0]  obj,
  output fall_state_t [NUM_OBJ-1:0]  fstate,
  output logic                       frame_done,
  output logic [NUM_OBJ-1:0]         fall_upd
);
  ycc_t        ycc_new, ycc_bg;
  logic        fg;
  logic [1:0]  v_d;
  logic [1:0][10:0] x_d, y_d;
  logic        m_v, m_b, p_v, p_b;
  logic [10:0] m_x, m_y, p_x, p_y;

  rgb2ycrcb u_ycc_new (.clk, .rgb(in_new), .ycc(ycc_new));
  rgb2ycrcb u_ycc_bg  (.clk, .rgb(in_bg),  .ycc(ycc_bg));
  bg_subtract u_bgs (.clk, .cur(ycc_new), .bg(ycc_bg), .ty, .tcr, .tcb, .fg);

  // position and valid follow the two register stages above
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= '0; x_d <= '0; y_d <= '0;
    end else begin
      v_d <= {v_d[0], in_valid};
      x_d <= {x_d[0], in_x};
      y_d <= {y_d[0], in_y};
    end
  end

  median_filter #(.W(W), .H(H), .K(MED_K)) u_med (
    .clk, .rst_n, .in_valid(v_d[1]), .in_bit(fg), .in_x(x_d[1]), .in_y(y_d[1]),
    .out_valid(m_v), .out_bit(m_b), .out_x(m_x), .out_y(m_y));

  morph_process #(.W(W), .H(H), .K(MORPH_K)) u_morph (
    .clk, .rst_n, .in_valid(m_v), .in_bit(m_b), .in_x(m_x), .in_y(m_y),
    .out_valid(p_v), .out_bit(p_b), .out_x(p_x), .out_y(p_y));

  onchip_mem #(.W(W), .H(H)) u_mask (
    .clk, .we(p_v), .wx(p_x), .wy(p_y), .wbit(p_b), .rx(rd_x), .ry(rd_y), .rbit(rd_bit));

  feature_extract #(.W(W), .H(H), .NUM_OBJ(NUM_OBJ), .DIST(DIST)) u_feat (
    .clk, .rst_n, .in_valid(p_v), .in_bit(p_b), .in_x(p_x), .in_y(p_y), .obj, .frame_done);

  for (genvar i = 0; i < NUM_OBJ; i++) begin : g_fall
    fall_detect #(.HIST(HIST), .INACT_SEC(INACT_SEC), .TICKS_PER_SEC(TICKS_PER_SEC)) u_fall (
      .clk, .rst_n, .frame_done, .obj(obj[i]), .tick, .state(fstate[i]),
      .fall_recognized(), .fall_confirmed(), .ratio_f(), .ratio_q(), .upd(fall_upd[i]));
  end
endmodule
