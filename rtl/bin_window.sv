// bin_window: K x K sliding window over a raster stream of 1-bit pixels.
// Input pixels arrive in raster order, one per `in_valid`, with their
// position. K-1 line buffers (one memory of W words of K-1 bits) hold the
// previous rows, and a K-column shift register holds the window. For input
// position (x, y) the window is centred R = (K-1)/2 pixels and R lines
// earlier in stream order; that centre is given on out_x/out_y and may lie
// in the previous line or, for the first R lines, the previous frame, so a
// frame leaves the window R lines + R pixels after it entered (the pixel
// pipelining of the source: no frame is stored). `vmask` marks the window
// cells that lie inside the frame; cells outside hold stale data and must be
// ignored by the user. Window cell win[i*K+c] is row cy-R+i, column cx-R+c.
// Outputs are valid one clock after the input that completes the window,
// starting with the centre (0,0) of the first frame after reset.
module bin_window #(
  parameter int W = 640,
  parameter int H = 480,
  parameter int K = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic [10:0]   in_x,
  input  logic [10:0]   in_y,
  output logic          out_valid,
  output logic [10:0]   out_x,
  output logic [10:0]   out_y,
  output logic [K*K-1:0] win,
  output logic [K*K-1:0] vmask
);
  localparam int R  = (K - 1) / 2;
  localparam int XW = $clog2(W);

  logic [K-2:0] lb [W];
  logic [K-2:0] lb_rd;
  logic [K-1:0] col;
  logic [K-1:0] wcol [K];
  logic         started;
  int           cx_i, cy_i;

  assign lb_rd = lb[XW'(in_x)];
  assign col   = {lb_rd, in_bit};        // col[j] = row y-j

  always_comb begin
    int yy;
    yy   = int'(in_y);
    cx_i = int'(in_x) - R;
    if (cx_i < 0) begin
      cx_i = cx_i + W;
      yy   = yy - 1;
    end
    cy_i = yy - R;
    if (cy_i < 0) cy_i = cy_i + H;
  end

  always_ff @(posedge clk) begin
    if (in_valid) lb[XW'(in_x)] <= col[K-2:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0; out_valid <= 1'b0; out_x <= '0; out_y <= '0;
      for (int c = 0; c < K; c++) wcol[c] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int c = 0; c < K - 1; c++) wcol[c] <= wcol[c+1];
        wcol[K-1] <= col;
        out_x     <= 11'(cx_i);
        out_y     <= 11'(cy_i);
        if (started || (cx_i == 0 && cy_i == 0)) begin
          started   <= 1'b1;
          out_valid <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < K; i++) begin
      for (int c = 0; c < K; c++) begin
        win[i*K+c]   = wcol[c][K-1-i];
        vmask[i*K+c] = (int'(out_y) - R + i >= 0) && (int'(out_y) - R + i < H) &&
                       (int'(out_x) - R + c >= 0) && (int'(out_x) - R + c < W);
      end
    end
  end
endmodule
