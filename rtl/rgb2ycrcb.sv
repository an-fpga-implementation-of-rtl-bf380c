// rgb2ycrcb: colour-space conversion for shadow-aware background subtraction.
//   Y  = 0.299 R + 0.587 G + 0.114 B
//   Cr = 0.713 (R - Y)
//   Cb = 0.565 (B - Y)
// The equations are the source's; the coefficients are held in 10-bit fixed
// point (306, 601, 117 and 730, 579 over 1024, this design's choice) and the
// products truncated. Y is 10 bits unsigned, Cr and Cb are signed 11-bit
// differences without offset. Y is combinational (continuous assignment),
// the three results are registered: latency one clock, one pixel per clock.
module rgb2ycrcb
  import fd_pkg::*;
(
  input  logic clk,
  input  rgb_t rgb,
  output ycc_t ycc
);
  logic        [19:0] ysum;
  logic        [9:0]  y;
  logic signed [21:0] crp, cbp;

  assign ysum = 20'd306 * rgb.r + 20'd601 * rgb.g + 20'd117 * rgb.b;
  assign y    = ysum[19:10];
  assign crp  = 22'sd730 * (22'($signed({1'b0, rgb.r})) - 22'($signed({1'b0, y})));
  assign cbp  = 22'sd579 * (22'($signed({1'b0, rgb.b})) - 22'($signed({1'b0, y})));

  always_ff @(posedge clk) begin
    ycc.y  <= y;
    ycc.cr <= 11'(crp >>> 10);
    ycc.cb <= 11'(cbp >>> 10);
  end
endmodule
