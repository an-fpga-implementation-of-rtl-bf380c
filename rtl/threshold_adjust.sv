// threshold_adjust: the user-set thresholds for Y, Cr and Cb.
// `sel` picks one of the three thresholds (0 Y, 1 Cr, 2 Cb); a rising edge
// on `inc` or `dec` (push buttons, already synchronised) moves it by STEP,
// saturating at 0 and 1023. The three registers start at TY_INIT and TC_INIT
// after reset. Having three separately adjustable thresholds follows the
// source; the button interface, step and reset values are this design's.
module threshold_adjust #(
  parameter logic [9:0] TY_INIT = 10'd40,
  parameter logic [9:0] TC_INIT = 10'd12,
  parameter logic [9:0] STEP    = 10'd1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] sel,
  input  logic       inc,
  input  logic       dec,
  output logic [9:0] ty,
  output logic [9:0] tcr,
  output logic [9:0] tcb
);
  logic       inc_q, dec_q, up, dn;
  logic [9:0] cur, nxt;

  assign up = inc && !inc_q;
  assign dn = dec && !dec_q;

  always_comb begin
    unique case (sel)
      2'd1:    cur = tcr;
      2'd2:    cur = tcb;
      default: cur = ty;
    endcase
    nxt = cur;
    if (up && !dn) nxt = (cur > 10'd1023 - STEP) ? 10'd1023 : cur + STEP;
    else if (dn && !up) nxt = (cur < STEP) ? 10'd0 : cur - STEP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_q <= 1'b0; dec_q <= 1'b0; ty <= TY_INIT; tcr <= TC_INIT; tcb <= TC_INIT;
    end else begin
      inc_q <= inc;
      dec_q <= dec;
      unique case (sel)
        2'd0:    ty  <= nxt;
        2'd1:    tcr <= nxt;
        2'd2:    tcb <= nxt;
        default: ;
      endcase
    end
  end
endmodule
