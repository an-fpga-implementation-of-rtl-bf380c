// display_mux: picks what the VGA monitor shows and draws the boxes.
// `mode` selects the camera image (0) or the foreground mask (1, white on
// black). On top, the outline of every valid object box is drawn one pixel
// wide: green for a normal object, yellow once a fall is recognised, red
// once it is confirmed. Yellow and red follow the source; green and the
// mode select are this design's. Output registered: one clock.
module display_mux
  import fd_pkg::*;
#(
  parameter int NUM_OBJ = 4
) (
  input  logic                          clk,
  input  logic                          mode,
  input  logic [10:0]                   x,
  input  logic [10:0]                   y,
  input  rgb_t                          cam,
  input  logic                          mask,
  input  obj_t        [NUM_OBJ-1:0]     obj,
  input  fall_state_t [NUM_OBJ-1:0]     st,
  output rgb_t                          pix
);
  rgb_t c;
  always_comb begin
    c = mode ? (mask ? rgb_t'({10'h3FF, 10'h3FF, 10'h3FF}) : rgb_t'('0)) : cam;
    for (int i = 0; i < NUM_OBJ; i++) begin
      if (obj[i].valid &&
          (((x == obj[i].xmin || x == obj[i].xmax) && y >= obj[i].ymin && y <= obj[i].ymax) ||
           ((y == obj[i].ymin || y == obj[i].ymax) && x >= obj[i].xmin && x <= obj[i].xmax))) begin
        unique case (st[i])
          S_CONFIRMED: c = '{r: 10'h3FF, g: 10'h000, b: 10'h000};
          S_POSSIBLE:  c = '{r: 10'h3FF, g: 10'h3FF, b: 10'h000};
          default:     c = '{r: 10'h000, g: 10'h3FF, b: 10'h000};
        endcase
      end
    end
  end
  always_ff @(posedge clk) pix <= c;
endmodule
