// median_filter: K x K (5x5) median of the binary foreground mask.
// For a binary image the median is a majority vote: the output is 1 when at
// least (K*K+1)/2 of the K*K window cells are 1. Cells outside the frame
// count as 0 (this design's border rule). This removes isolated noise
// pixels and fills small holes. The window comes from bin_window; the vote
// is registered, so an output follows its completing input by two clocks
// and is R lines + R pixels behind it in the stream.
module median_filter #(
  parameter int W = 640,
  parameter int H = 480,
  parameter int K = 5
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
  localparam int N = K * K;
  logic            wv;
  logic [10:0]     wx, wy;
  logic [N-1:0]    win, vmask, ones;
  logic [$clog2(N+1)-1:0] cnt;

  bin_window #(.W(W), .H(H), .K(K)) u_win (
    .clk, .rst_n, .in_valid, .in_bit, .in_x, .in_y,
    .out_valid(wv), .out_x(wx), .out_y(wy), .win, .vmask);

  assign ones = win & vmask;
  always_comb begin
    cnt = '0;
    for (int i = 0; i < N; i++) cnt += $bits(cnt)'(ones[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_bit <= 1'b0; out_x <= '0; out_y <= '0;
    end else begin
      out_valid <= wv;
      out_bit   <= cnt >= $bits(cnt)'((N + 1) / 2);
      out_x     <= wx;
      out_y     <= wy;
    end
  end
endmodule
