// morph_filter: one binary morphological operation with a K x K square.
// DILATE = 0 gives erosion (output 1 only if every in-frame cell of the
// window is 1), DILATE = 1 gives dilation (output 1 if any in-frame cell is
// 1). Cells outside the frame are ignored. Window from bin_window, result
// registered: two clocks after the completing input, R lines + R pixels
// behind it in the stream.
module morph_filter #(
  parameter int W      = 640,
  parameter int H      = 480,
  parameter int K      = 3,
  parameter bit DILATE = 1'b0
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
  logic             wv;
  logic [10:0]      wx, wy;
  logic [K*K-1:0]   win, vmask;

  bin_window #(.W(W), .H(H), .K(K)) u_win (
    .clk, .rst_n, .in_valid, .in_bit, .in_x, .in_y,
    .out_valid(wv), .out_x(wx), .out_y(wy), .win, .vmask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_bit <= 1'b0; out_x <= '0; out_y <= '0;
    end else begin
      out_valid <= wv;
      out_bit   <= DILATE ? |(win & vmask) : &(win | ~vmask);
      out_x     <= wx;
      out_y     <= wy;
    end
  end
endmodule
