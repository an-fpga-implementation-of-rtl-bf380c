// onchip_mem: one-bit-per-pixel frame store for the final foreground mask.
// The processing pipeline writes each filtered mask pixel at its (x, y);
// the display reads the mask at the position being shown, one clock after
// the address (registered read). W x H bits, address y*W + x. What the
// on-chip memory holds is this design's choice; the source only shows it
// between the processing blocks and the display.
module onchip_mem #(
  parameter int W = 640,
  parameter int H = 480
) (
  input  logic        clk,
  input  logic        we,
  input  logic [10:0] wx,
  input  logic [10:0] wy,
  input  logic        wbit,
  input  logic [10:0] rx,
  input  logic [10:0] ry,
  output logic        rbit
);
  localparam int N  = W * H;
  localparam int AW = $clog2(N);
  logic          mem [N];
  logic [AW-1:0] wa, ra;

  assign wa = AW'(AW'(wy) * AW'(W)) + AW'(wx);
  assign ra = AW'(AW'(ry) * AW'(W)) + AW'(rx);

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wbit;
    rbit <= mem[ra];
  end
endmodule
