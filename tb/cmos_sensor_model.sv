// cmos_sensor_model: behavioural model of the camera for simulation only.
// Sends RAW_W x RAW_H Bayer samples per frame (G1 R / B G2 quads) with
// frame-valid and line-valid, H_BLANK clocks between lines and V_BLANK
// clocks between frames; outputs change on the falling clock edge. The
// scene is a near-grey textured background; when obj_en is set an orange, brighter
// rectangle (obj_x0..obj_x1, obj_y0..obj_y1 in RGB pixels, i.e. quads) is
// drawn, and when shadow_en is set a shadow (background at 60 %) lies on
// shadow_x0..shadow_x1 of the same rows. Parameters of the scene are taken
// at the start of each frame; `frames` counts frames sent.
module cmos_sensor_model #(
  parameter int RAW_W   = 32,
  parameter int RAW_H   = 24,
  parameter int H_BLANK = 8,
  parameter int V_BLANK = 20
) (
  input  logic       clk,
  input  logic       run,
  input  logic       obj_en,
  input  int         obj_x0, obj_x1, obj_y0, obj_y1,
  input  logic       shadow_en,
  input  int         shadow_x0, shadow_x1,
  output logic       fval,
  output logic       lval,
  output logic [9:0] data,
  output int         frames
);
  // RGB value of quad (qx, qy) for the current scene
  function automatic logic [29:0] scene(int qx, int qy, bit oe, int ox0, int ox1, int oy0, int oy1,
                                        bit se, int sx0, int sx1);
    int r, g, b;
    r = 400 + (qx % 7) * 3; g = 410 + (qy % 5) * 3; b = 395 + ((qx + qy) % 3) * 4;
    if (oe && qx >= ox0 && qx <= ox1 && qy >= oy0 && qy <= oy1) begin
      r = 900; g = 700; b = 300;
    end else if (se && qx >= sx0 && qx <= sx1 && qy >= oy0 && qy <= oy1) begin
      r = r * 6 / 10; g = g * 6 / 10; b = b * 6 / 10;
    end
    return {10'(r), 10'(g), 10'(b)};
  endfunction

  initial begin
    fval = 0; lval = 0; data = 0; frames = 0;
  end

  always begin
    bit oe, se;
    int ox0, ox1, oy0, oy1, sx0, sx1;
    logic [29:0] c;
    @(negedge clk);
    if (run) begin
      oe = obj_en; ox0 = obj_x0; ox1 = obj_x1; oy0 = obj_y0; oy1 = obj_y1;
      se = shadow_en; sx0 = shadow_x0; sx1 = shadow_x1;
      fval = 1;
      for (int y = 0; y < RAW_H; y++) begin
        repeat (H_BLANK) @(negedge clk);
        for (int x = 0; x < RAW_W; x++) begin
          c = scene(x / 2, y / 2, oe, ox0, ox1, oy0, oy1, se, sx0, sx1);
          lval = 1;
          if (y % 2 == 0) data = (x % 2 == 0) ? c[19:10] : c[29:20];   // G1 R
          else            data = (x % 2 == 0) ? c[9:0]   : c[19:10];   // B G2
          @(negedge clk);
        end
        lval = 0;
      end
      repeat (H_BLANK) @(negedge clk);
      fval = 0;
      frames++;
      repeat (V_BLANK) @(negedge clk);
    end
  end
endmodule
