// int2float: unsigned integer to IEEE-754 single precision.
// Finds the leading one of `a`; the exponent is 127 plus its position and
// the bits below it, left-aligned, are the 23-bit fraction (exact, since
// IW <= 24). Zero gives +0.0. Purely combinational. The source converts the
// box width and height this way before the floating-point division.
module int2float #(
  parameter int IW = 16
) (
  input  logic [IW-1:0] a,
  output logic [31:0]   f
);
  always_comb begin
    int          msb;
    logic [22:0] frac;
    msb = -1;
    for (int i = 0; i < IW; i++) if (a[i]) msb = i;
    frac = '0;
    if (msb < 0) begin
      f = 32'd0;
    end else begin
      frac = 23'(({23'd0, a} << (23 - msb)));
      f    = {1'b0, 8'(127 + msb), frac};
    end
  end
endmodule
