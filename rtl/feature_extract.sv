// feature_extract: multi-object bounding boxes and their features.
// While a frame streams in, each foreground pixel is compared with up to
// NUM_OBJ open boxes: it joins the first box whose outline, grown by DIST
// pixels on every side, contains it (so a pixel closer than DIST to a box
// horizontally and vertically belongs to that object); otherwise it opens a
// free box, or is dropped when all boxes are in use. Each box keeps its
// extent and the sums of member coordinates and the member count.
// When the last pixel of the frame (W-1, H-1) has been taken, the boxes are
// copied aside and the next frame starts with empty boxes at once. The copy
// is then post-processed: pairs of boxes are joined when the centre of one
// lies inside the other, pass after pass until no pair joins, and the
// centroid (mean member position) of every box is computed with a shared
// sequential divider. Finally `obj` is updated and `frame_done` pulses;
// `obj` holds until the next update. Post-processing takes at most about
// 3*NUM_OBJ*(NUM_OBJ-1)/2 + 2*NUM_OBJ*34 clocks, far less than a frame.
// The matching distance, merge rule and features follow the source; DIST,
// the first-match rule and dropping extra objects are this design's choices.
module feature_extract
  import fd_pkg::*;
#(
  parameter int W       = 640,
  parameter int H       = 480,
  parameter int NUM_OBJ = 4,
  parameter int DIST    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_bit,
  input  logic [10:0]              in_x,
  input  logic [10:0]              in_y,
  output obj_t [NUM_OBJ-1:0]       obj,
  output logic                     frame_done
);
  typedef struct packed {
    logic        act;
    logic [10:0] xmin, xmax, ymin, ymax;
    logic [31:0] sx, sy, n;
  } acc_t;

  acc_t [NUM_OBJ-1:0] acc, acc_n, snap;
  logic               eof;

  // ---------------- streaming accumulation ----------------
  always_comb begin
    logic found;
    acc_n = acc;
    found = 1'b0;
    if (in_valid && in_bit) begin
      for (int i = 0; i < NUM_OBJ; i++) begin
        if (!found && acc[i].act &&
            int'(in_x) + DIST >= int'(acc[i].xmin) && int'(in_x) <= int'(acc[i].xmax) + DIST &&
            int'(in_y) + DIST >= int'(acc[i].ymin) && int'(in_y) <= int'(acc[i].ymax) + DIST) begin
          found = 1'b1;
          if (in_x < acc[i].xmin) acc_n[i].xmin = in_x;
          if (in_x > acc[i].xmax) acc_n[i].xmax = in_x;
          if (in_y < acc[i].ymin) acc_n[i].ymin = in_y;
          if (in_y > acc[i].ymax) acc_n[i].ymax = in_y;
          acc_n[i].sx = acc[i].sx + 32'(in_x);
          acc_n[i].sy = acc[i].sy + 32'(in_y);
          acc_n[i].n  = acc[i].n + 32'd1;
        end
      end
      for (int i = 0; i < NUM_OBJ; i++) begin
        if (!found && !acc[i].act) begin
          found          = 1'b1;
          acc_n[i].act   = 1'b1;
          acc_n[i].xmin  = in_x;  acc_n[i].xmax = in_x;
          acc_n[i].ymin  = in_y;  acc_n[i].ymax = in_y;
          acc_n[i].sx    = 32'(in_x);
          acc_n[i].sy    = 32'(in_y);
          acc_n[i].n     = 32'd1;
        end
      end
    end
  end

  assign eof = in_valid && (in_x == 11'(W - 1)) && (in_y == 11'(H - 1));

  // ---------------- post-processing ----------------
  typedef enum logic [2:0] {P_IDLE, P_MERGE, P_DIV_START, P_DIV_WAIT, P_OUT} pst_t;
  pst_t        pst;
  logic [$clog2(NUM_OBJ)-1:0] pi, pj, di;
  logic        dsel_y, changed;
  logic        dstart, dbusy, ddone;
  logic [31:0] da, db, dq, dr;
  logic [NUM_OBJ-1:0][10:0] cent_x, cent_y;

  function automatic logic [10:0] mid(input logic [10:0] lo, input logic [10:0] hi);
    logic [11:0] s;
    s = {1'b0, lo} + {1'b0, hi};
    return s[11:1];
  endfunction

  function automatic logic inside_box(input acc_t b, input logic [10:0] px, input logic [10:0] py);
    return px >= b.xmin && px <= b.xmax && py >= b.ymin && py <= b.ymax;
  endfunction

  assign da = dsel_y ? snap[di].sy : snap[di].sx;
  assign db = snap[di].n;

  seq_divider #(.N(32)) u_div (
    .clk, .rst_n, .start(dstart), .a(da), .b(db), .busy(dbusy), .done(ddone), .q(dq), .r(dr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; snap <= '0; pst <= P_IDLE; pi <= '0; pj <= '0; di <= '0; dsel_y <= 1'b0;
      changed <= 1'b0; dstart <= 1'b0; obj <= '0; frame_done <= 1'b0; cent_x <= '0; cent_y <= '0;
    end else begin
      dstart     <= 1'b0;
      frame_done <= 1'b0;
      if (eof) begin
        snap <= acc_n;
        acc  <= '0;
        pst  <= P_MERGE;
        pi   <= '0;
        pj   <= 1;
        changed <= 1'b0;
      end else begin
        acc <= acc_n;
      end
      unique case (pst)
        P_IDLE: ;
        P_MERGE: if (!eof) begin
          if (snap[pi].act && snap[pj].act &&
              (inside_box(snap[pi], mid(snap[pj].xmin, snap[pj].xmax), mid(snap[pj].ymin, snap[pj].ymax)) ||
               inside_box(snap[pj], mid(snap[pi].xmin, snap[pi].xmax), mid(snap[pi].ymin, snap[pi].ymax)))) begin
            snap[pi].xmin <= (snap[pj].xmin < snap[pi].xmin) ? snap[pj].xmin : snap[pi].xmin;
            snap[pi].xmax <= (snap[pj].xmax > snap[pi].xmax) ? snap[pj].xmax : snap[pi].xmax;
            snap[pi].ymin <= (snap[pj].ymin < snap[pi].ymin) ? snap[pj].ymin : snap[pi].ymin;
            snap[pi].ymax <= (snap[pj].ymax > snap[pi].ymax) ? snap[pj].ymax : snap[pi].ymax;
            snap[pi].sx   <= snap[pi].sx + snap[pj].sx;
            snap[pi].sy   <= snap[pi].sy + snap[pj].sy;
            snap[pi].n    <= snap[pi].n + snap[pj].n;
            snap[pj].act  <= 1'b0;
            changed       <= 1'b1;
          end
          // next pair (pi < pj)
          if (int'(pj) == NUM_OBJ - 1) begin
            if (int'(pi) == NUM_OBJ - 2) begin
              pi <= '0;
              pj <= 1;
              if (!changed && !(snap[pi].act && snap[pj].act &&
                  (inside_box(snap[pi], mid(snap[pj].xmin, snap[pj].xmax), mid(snap[pj].ymin, snap[pj].ymax)) ||
                   inside_box(snap[pj], mid(snap[pi].xmin, snap[pi].xmax), mid(snap[pi].ymin, snap[pi].ymax))))) begin
                pst <= P_DIV_START;
                di  <= '0;
                dsel_y <= 1'b0;
              end
              changed <= 1'b0;
            end else begin
              pi <= pi + 1'b1;
              pj <= pi + 2'd2;
            end
          end else begin
            pj <= pj + 1'b1;
          end
        end
        P_DIV_START: if (!eof) begin
          if (snap[di].act) begin
            dstart <= 1'b1;
            pst    <= P_DIV_WAIT;
          end else if (int'(di) == NUM_OBJ - 1) begin
            pst <= P_OUT;
          end else begin
            di <= di + 1'b1;
          end
        end
        P_DIV_WAIT: if (!eof && ddone) begin
          if (dsel_y) cent_y[di] <= dq[10:0];
          else        cent_x[di] <= dq[10:0];
          if (!dsel_y) begin
            dsel_y <= 1'b1;
            pst    <= P_DIV_START;
          end else begin
            dsel_y <= 1'b0;
            if (int'(di) == NUM_OBJ - 1) pst <= P_OUT;
            else begin
              di  <= di + 1'b1;
              pst <= P_DIV_START;
            end
          end
        end
        P_OUT: if (!eof) begin
          for (int i = 0; i < NUM_OBJ; i++) begin
            obj[i].valid  <= snap[i].act;
            obj[i].xmin   <= snap[i].xmin;
            obj[i].xmax   <= snap[i].xmax;
            obj[i].ymin   <= snap[i].ymin;
            obj[i].ymax   <= snap[i].ymax;
            obj[i].width  <= snap[i].xmax - snap[i].xmin + 11'd1;
            obj[i].height <= snap[i].ymax - snap[i].ymin + 11'd1;
            obj[i].cent_x <= cent_x[i];
            obj[i].cent_y <= cent_y[i];
            obj[i].mid_x  <= mid(snap[i].xmin, snap[i].xmax);
            obj[i].mid_y  <= mid(snap[i].ymin, snap[i].ymax);
          end
          frame_done <= 1'b1;
          pst        <= P_IDLE;
        end
        default: pst <= P_IDLE;
      endcase
    end
  end
endmodule
