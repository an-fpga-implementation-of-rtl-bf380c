// raw2rgb: Bayer raw data to RGB with 2:1 reduction in both directions.
// The raw image (RAW_W x RAW_H, e.g. 1280x960) is made of 2x2 quads laid out
//     G1 R      (even raw row)
//     B  G2     (odd raw row)
// and every quad becomes one RGB pixel, so 1280x960 turns into 640x480.
// The even row is held in a one-line buffer (RAW_W samples); while the odd
// row arrives, each odd column completes a quad and an RGB pixel is emitted
// with G = (G1+G2)/2. The quad layout and the green averaging are this
// design's choices; the 2:1 reduction and 10-bit components follow the
// source description. Output is registered: one cycle after the G2 sample.
module raw2rgb
  import fd_pkg::*;
#(
  parameter int RAW_W = 1280,
  parameter int DW    = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          raw_valid,
  input  logic [10:0]   raw_x,
  input  logic [10:0]   raw_y,
  input  logic [DW-1:0] raw,
  input  logic          bg_frame_in,
  output logic          rgb_valid,
  output rgb_t          rgb,
  output logic          bg_frame_out   // pixel belongs to a background frame
);
  logic [DW-1:0] line_mem [RAW_W];
  logic [DW-1:0] up, left_s, up_left;   // quad members already seen
  logic [DW:0]   gsum;

  always_ff @(posedge clk) begin
    if (raw_valid && !raw_y[0]) line_mem[raw_x] <= raw;
  end

  assign up   = line_mem[raw_x];        // sample above the current one
  assign gsum = {1'b0, up_left} + {1'b0, raw};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgb_valid <= 1'b0; rgb <= '0; left_s <= '0; up_left <= '0; bg_frame_out <= 1'b0;
    end else begin
      rgb_valid <= 1'b0;
      if (raw_valid && raw_y[0]) begin
        if (!raw_x[0]) begin            // B sample, remember it and the G1 above
          left_s  <= raw;
          up_left <= up;
        end else begin                  // G2 sample: quad complete, R is above
          rgb_valid    <= 1'b1;
          rgb.r        <= up;
          rgb.g        <= gsum[DW:1];
          rgb.b        <= left_s;
          bg_frame_out <= bg_frame_in;
        end
      end
    end
  end
endmodule
