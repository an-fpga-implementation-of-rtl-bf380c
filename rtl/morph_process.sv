// morph_process: opening followed by closing of the binary mask.
// Opening (erode, then dilate) removes foreground specks smaller than the
// structuring element; closing (dilate, then erode) fills narrow gaps and
// smooths the silhouette boundary. Four morph_filter stages in a row, each
// with a K x K square (3x3 by default, this design's choice; the
// opening-closing order is the source's). Latency: 4 x (R lines + R pixels)
// in stream order plus 8 clocks.
module morph_process #(
  parameter int W = 640,
  parameter int H = 480,
  parameter int K = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_bit,
  input  logic [10:0] in_x,
  input  logic [10:0] in_y,
  output logic        out_valid,
  output logic        out_bit,
  output logic [10:0] out_x,
  output logic [10:0] out_y
);
  localparam bit [3:0] OPS = 4'b0110;   // stage 0 erode, 1 dilate, 2 dilate, 3 erode
  logic [4:0]       v, b;
  logic [4:0][10:0] xs, ys;

  assign v[0] = in_valid;  assign b[0] = in_bit;
  assign xs[0] = in_x;     assign ys[0] = in_y;

  for (genvar s = 0; s < 4; s++) begin : g_stage
    morph_filter #(.W(W), .H(H), .K(K), .DILATE(OPS[s])) u_op (
      .clk, .rst_n, .in_valid(v[s]), .in_bit(b[s]), .in_x(xs[s]), .in_y(ys[s]),
      .out_valid(v[s+1]), .out_bit(b[s+1]), .out_x(xs[s+1]), .out_y(ys[s+1]));
  end

  assign out_valid = v[4];
  assign out_bit   = b[4];
  assign out_x     = xs[4];
  assign out_y     = ys[4];
endmodule
