// bg_subtract: frame-differencing background subtraction with shadow reduction.
// A pixel is foreground when its luma differs from the background model by
// more than Ty. A pixel that is darker than the background may be a shadow:
// shadows lower the luma but barely change the chroma, so such a pixel is
// kept as foreground only if Cr or Cb also differs by more than its own
// threshold. The rule follows the source; treating the two chroma tests as
// an OR is this design's reading. Combinational compare, registered result:
// latency one clock.
module bg_subtract
  import fd_pkg::*;
(
  input  logic       clk,
  input  ycc_t       cur,
  input  ycc_t       bg,
  input  logic [9:0] ty,
  input  logic [9:0] tcr,
  input  logic [9:0] tcb,
  output logic       fg
);
  logic [9:0]  dy;
  logic [11:0] dcr, dcb;
  logic        darker, fg_c;

  assign darker = cur.y < bg.y;
  assign dy     = darker ? bg.y - cur.y : cur.y - bg.y;
  logic signed [11:0] cr_c, cr_b, cb_c, cb_b;
  assign cr_c   = 12'($signed(cur.cr));
  assign cr_b   = 12'($signed(bg.cr));
  assign cb_c   = 12'($signed(cur.cb));
  assign cb_b   = 12'($signed(bg.cb));
  assign dcr    = (cr_c > cr_b) ? 12'(cr_c - cr_b) : 12'(cr_b - cr_c);
  assign dcb    = (cb_c > cb_b) ? 12'(cb_c - cb_b) : 12'(cb_b - cb_c);
  assign fg_c   = (dy > ty) && (!darker || (dcr > {2'b0, tcr}) || (dcb > {2'b0, tcb}));

  always_ff @(posedge clk) fg <= fg_c;
endmodule
