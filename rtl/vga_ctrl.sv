// vga_ctrl: 640x480 display timing that also paces the whole pixel pipeline.
// Horizontal and vertical counters run over H_TOTAL x V_TOTAL positions,
// active area first, then front porch, sync and back porch (negative sync
// polarity). In the active area `req` asks the image buffer for the next
// pair of pixels and x/y give their position, so processing follows the
// display clock. For frame-rate measurement, `test_pulse` is high from the
// first to the last active pixel of a frame and `count_cycle` counts clocks
// from 0 at the first pixel; `frame_cycles` holds the count reached at the
// last pixel of the previous frame. The counters stay at the first pixel
// until `en` is high. The test pulse and cycle counter follow the source;
// the porch and sync lengths (standard 640x480 at 25 MHz) are assumed.
// Timing: all outputs are derived from the counter registers of this cycle.
module vga_ctrl #(
  parameter int H_ACT = 640,
  parameter int H_FP  = 16,
  parameter int H_SYN = 96,
  parameter int H_BP  = 48,
  parameter int V_ACT = 480,
  parameter int V_FP  = 10,
  parameter int V_SYN = 2,
  parameter int V_BP  = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        req,
  output logic [10:0] x,
  output logic [10:0] y,
  output logic        hs_n,
  output logic        vs_n,
  output logic        blank_n,
  output logic        frame_start,   // first active pixel of a frame
  output logic        test_pulse,
  output logic [31:0] count_cycle,
  output logic [31:0] frame_cycles
);
  localparam int H_TOTAL = H_ACT + H_FP + H_SYN + H_BP;
  localparam int V_TOTAL = V_ACT + V_FP + V_SYN + V_BP;

  logic [10:0] h, v;
  logic        last_px;

  assign x           = h;
  assign y           = v;
  assign blank_n     = (h < 11'(H_ACT)) && (v < 11'(V_ACT));
  assign req         = en && blank_n;
  assign hs_n        = !((h >= 11'(H_ACT + H_FP)) && (h < 11'(H_ACT + H_FP + H_SYN)));
  assign vs_n        = !((v >= 11'(V_ACT + V_FP)) && (v < 11'(V_ACT + V_FP + V_SYN)));
  assign frame_start = en && (h == '0) && (v == '0);
  assign test_pulse  = en && ((v < 11'(V_ACT - 1)) || (v == 11'(V_ACT - 1) && h < 11'(H_ACT)));
  assign last_px     = (h == 11'(H_ACT - 1)) && (v == 11'(V_ACT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; v <= '0; count_cycle <= '0; frame_cycles <= '0;
    end else if (en) begin
      if (h == 11'(H_TOTAL - 1)) begin
        h <= '0;
        v <= (v == 11'(V_TOTAL - 1)) ? '0 : v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
      if (last_px) frame_cycles <= count_cycle;
      count_cycle <= (test_pulse && !last_px) ? count_cycle + 1'b1 : '0;
    end
  end
endmodule
