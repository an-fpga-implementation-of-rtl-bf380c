// tb_fall_detect: drives object features frame by frame (HIST = 4 frames
// per "second", 2 ticks per second, 2 s inactivity) and follows the state
// machine through every transition: no object -> normal -> fall recognised
// -> confirmed -> normal, a recognised fall cancelled by movement, one
// cancelled by standing up, a slow lowering that is not a fall, and the
// object leaving. Checks the 8.8 ratio for H/W = 3 and the 28-clock update.
module tb_fall_detect;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0, frame_done = 0, tick = 0, fall_recognized, fall_confirmed, upd;
  obj_t obj;
  fall_state_t state;
  logic [31:0] ratio_f;
  logic [15:0] ratio_q;
  int checks = 0, failures = 0;
  fall_detect #(.HIST(4), .INACT_SEC(2), .TICKS_PER_SEC(2), .MOVE_PX(5)) dut (
    .clk, .rst_n, .frame_done, .obj, .tick, .state, .fall_recognized, .fall_confirmed,
    .ratio_f, .ratio_q, .upd);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // one frame: set features, pulse frame_done, wait for the update
  task automatic frame(bit v, int w, int h, int cx, int cy, int ticks, fall_state_t exp_st);
    int c;
    @(negedge clk);
    obj = '0; obj.valid = v; obj.width = 11'(w); obj.height = 11'(h);
    obj.cent_x = 11'(cx); obj.cent_y = 11'(cy);
    frame_done = 1; @(negedge clk); frame_done = 0;
    c = 1;
    while (!upd) begin @(negedge clk); c++; end
    checks++;
    if (v && c != 28) begin failures++; $display("update after %0d clocks", c); end
    checks++;
    if (state != exp_st || fall_recognized != (exp_st == S_POSSIBLE) || fall_confirmed != (exp_st == S_CONFIRMED)) begin
      failures++; $display("state %0d expected %0d (w%0d h%0d)", state, exp_st, w, h);
    end
    for (int i = 0; i < ticks; i++) begin @(negedge clk); tick = 1; @(negedge clk); tick = 0; end
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    frame(0, 0, 0, 0, 0, 0, S_NO_OBJ);
    frame(1, 10, 30, 50, 40, 0, S_NORMAL);
    checks++;
    if (ratio_q != 16'd768) begin failures++; $display("ratio_q %0d", ratio_q); end
    repeat (4) frame(1, 10, 30, 50, 40, 0, S_NORMAL);
    frame(1, 30, 10, 52, 60, 1, S_POSSIBLE);          // sudden drop 3.0 -> 0.33
    frame(1, 30, 10, 54, 62, 2, S_POSSIBLE);          // small moves, 3 ticks so far
    frame(1, 30, 11, 53, 61, 2, S_POSSIBLE);          // 3 ticks seen at this update
    frame(1, 30, 11, 53, 61, 0, S_CONFIRMED);         // 5 ticks: more than 2 s
    frame(1, 30, 10, 53, 61, 0, S_CONFIRMED);
    frame(1, 10, 30, 50, 40, 0, S_NORMAL);            // stands up
    repeat (4) frame(1, 10, 30, 50, 40, 0, S_NORMAL);
    frame(1, 30, 10, 52, 60, 0, S_POSSIBLE);
    frame(1, 30, 10, 60, 60, 0, S_NORMAL);            // centroid moved 8 px
    repeat (4) frame(1, 10, 30, 50, 40, 0, S_NORMAL);
    frame(1, 30, 10, 52, 60, 0, S_POSSIBLE);
    frame(1, 10, 12, 52, 60, 0, S_NORMAL);            // ratio back above 1
    // slow lowering by 0.1 per frame: below 1 at the end, but only 0.4
    // lower than 4 frames earlier, so not a fall
    for (int h = 15; h >= 9; h--) frame(1, 10, h, 50, 40, 0, S_NORMAL);
    frame(0, 0, 0, 0, 0, 0, S_NO_OBJ);                // object leaves
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
