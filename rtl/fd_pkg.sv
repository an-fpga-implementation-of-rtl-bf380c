// fd_pkg: types and helper functions shared by the fall-detection pipeline.
// Pixels are 10 bits per colour component (30-bit RGB), luma is 10 bits
// unsigned and the chroma differences are 11-bit two's complement. Boxes and
// coordinates use 11-bit fields, wide enough for 1280 raw columns.
// The fall state encoding follows the four numbered states of the fall
// state machine (0 no object, 1 normal, 2 fall recognised/timing,
// 3 fall confirmed). The float/fixed helper converts a positive single
// precision value to unsigned 8.8 fixed point (this design's choice for
// keeping the aspect-ratio history).
package fd_pkg;
  localparam int CW = 11;                 // coordinate width

  typedef logic [CW-1:0] coord_t;

  typedef struct packed {
    logic [9:0] r;
    logic [9:0] g;
    logic [9:0] b;
  } rgb_t;

  typedef struct packed {
    logic [9:0]  y;
    logic [10:0] cr;   // two's complement, read with $signed()
    logic [10:0] cb;   // two's complement, read with $signed()
  } ycc_t;

  // One extracted object (bounding box and its features)
  typedef struct packed {
    logic   valid;
    coord_t xmin, xmax, ymin, ymax;
    coord_t width, height;     // xmax-xmin+1, ymax-ymin+1
    coord_t cent_x, cent_y;    // centroid: mean of member pixel coordinates
    coord_t mid_x, mid_y;      // centre of the bounding box
  } obj_t;

  typedef enum logic [1:0] {
    S_NO_OBJ    = 2'd0,
    S_NORMAL    = 2'd1,
    S_POSSIBLE  = 2'd2,
    S_CONFIRMED = 2'd3
  } fall_state_t;

  // Positive single-precision float to unsigned 8.8 fixed point, saturating.
  function automatic logic [15:0] f32_to_q8_8(input logic [31:0] f);
    logic [7:0]  e;
    logic [23:0] m;
    logic [47:0] v;
    int          sh;
    e = f[30:23];
    m = {1'b1, f[22:0]};
    if (f[31] || e == 8'd0) return 16'd0;
    // value = m * 2^(e-127-23); q8.8 = value * 2^8 = m * 2^(e-142)
    sh = int'(e) - 142;
    if (sh >= 0) begin
      if (sh > 8) return 16'hFFFF;
      v = {24'd0, m} << sh;
    end else begin
      if (sh < -24) return 16'd0;
      v = {24'd0, m} >> (-sh);
    end
    if (v > 48'hFFFF) return 16'hFFFF;
    return v[15:0];
  endfunction
endpackage
