// tb_fall_detection_top: the whole system, end to end, at a reduced size:
// 40x30 display (80x60 raw sensor), short blanking, 2-frame history, one
// "second" = 12000 display clocks and a 1 s inactivity period. A camera
// model, an SDRAM model and a display monitor surround the design.
// Scene: empty room (captured as background), a standing figure with a
// shadow beside it, the figure lying still, then an empty room again.
// Checks: the standing figure's box, shadow pixels absent from the mask,
// every fall state reached in order, the outline colours and the mask
// view on the VGA output, the frame cycle count, a threshold change, no
// FIFO overflow/underflow and no SDRAM protocol error. It counts how often
// each mechanism happened (background capture, SDRAM refresh, each state,
// each outline colour, mask view, threshold step) and fails any that never did.
module tb_fall_detection_top;
  import fd_pkg::*;
  localparam int HA = 40, VA = 30, HT = 60, NOBJ = 4;
  logic rst_n = 1, cam_clk = 0, sd_clk = 0, vga_clk = 0;
  logic fval, lval;
  logic [9:0] cam_data;
  logic cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [12:0] addr;
  logic [3:0] dqm;
  logic [31:0] dq_o, dq_i;
  logic key_bg = 0, key_inc = 0, key_dec = 0, show_mask = 0;
  logic [1:0] thr_sel = 0;
  logic [9:0] vr, vg, vb;
  logic hs_n, vs_n, blank_n, frame_done, test_pulse, wr_overflow, rd_underflow;
  fall_state_t [NOBJ-1:0] fall_state;
  obj_t [NOBJ-1:0] objects;
  logic [31:0] frame_cycles;
  int frames;
  logic obj_en = 0, shadow_en = 0;
  int ox0 = 0, ox1 = 0, oy0 = 0, oy1 = 0, sx0 = 0, sx1 = 0;
  int checks = 0, failures = 0;

  fall_detection_top #(.H_ACT(HA), .V_ACT(VA), .H_FP(4), .H_SYN(8), .H_BP(8), .V_FP(2), .V_SYN(2),
                       .V_BP(6), .CLK_HZ(12000), .TICKS_PER_SEC(1), .HIST(2), .INACT_SEC(1),
                       .INIT_CYC(100)) dut (
    .rst_n, .cam_pixclk(cam_clk), .cam_fval(fval), .cam_lval(lval), .cam_data,
    .sd_clk, .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n),
    .sdram_ba(ba), .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o), .sdram_dq_oe(dq_oe),
    .sdram_dq_i(dq_i), .vga_clk, .key_bg_capture(key_bg), .sw_thr_sel(thr_sel),
    .key_thr_inc(key_inc), .key_thr_dec(key_dec), .sw_show_mask(show_mask),
    .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs_n(hs_n), .vga_vs_n(vs_n), .vga_blank_n(blank_n),
    .fall_state, .objects, .frame_done, .test_pulse, .frame_cycles, .wr_overflow, .rd_underflow);
  sdram_model mdl (.clk(sd_clk), .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dq_o, .dq_oe, .dq_i);
  cmos_sensor_model #(.RAW_W(2*HA), .RAW_H(2*VA), .H_BLANK(8), .V_BLANK(40)) cam (
    .clk(cam_clk), .run(1'b1), .obj_en, .obj_x0(ox0), .obj_x1(ox1), .obj_y0(oy0), .obj_y1(oy1),
    .shadow_en, .shadow_x0(sx0), .shadow_x1(sx1), .fval, .lval, .data(cam_data), .frames);

  always #5 cam_clk = ~cam_clk;
  always #4 sd_clk = ~sd_clk;
  always #20 vga_clk = ~vga_clk;
  initial #1 rst_n = 0;

  initial begin
    #60_000_000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_bg_frames = 0, n_state [4], n_red = 0, n_yellow = 0, n_green = 0, n_white = 0, n_done = 0;
  int seen_order [$];
  fall_state_t last_st = S_NO_OBJ;
  initial for (int i = 0; i < 4; i++) n_state[i] = 0;
  always @(posedge cam_clk) if (dut.u_capture.fval && !dut.u_capture.fval_q && dut.u_capture.bg_pend) n_bg_frames++;
  always @(posedge vga_clk) if (rst_n) begin
    if (frame_done) n_done++;
    n_state[fall_state[0]]++;
    if (fall_state[0] != last_st) begin seen_order.push_back(int'(fall_state[0])); last_st = fall_state[0]; end
    if (blank_n) begin
      if (vr == 10'h3FF && vg == 10'h000 && vb == 10'h000) n_red++;
      if (vr == 10'h3FF && vg == 10'h3FF && vb == 10'h000) n_yellow++;
      if (vr == 10'h000 && vg == 10'h3FF && vb == 10'h000) n_green++;
      if (show_mask && vr == 10'h3FF && vg == 10'h3FF && vb == 10'h3FF) n_white++;
    end
  end

  task automatic expect_true(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_done(int n);
    int target;
    target = n_done + n;
    wait (n_done >= target);
  endtask

  initial begin
    #200; rst_n = 1;
    wait (frames >= 2);                       // background captured
    ox0 = 10; ox1 = 17; oy0 = 4; oy1 = 25; sx0 = 20; sx1 = 30;
    obj_en = 1; shadow_en = 1;
    wait (frames >= 4);
    wait_done(3);
    expect_true("standing box", objects[0].valid && objects[0].xmin == 10 && objects[0].xmax == 17 &&
                objects[0].ymin == 4 && objects[0].ymax == 25 && !objects[1].valid);
    expect_true("state normal", fall_state[0] == S_NORMAL);
    expect_true("frame cycle count", frame_cycles == 32'((VA - 1) * HT + HA - 1));
    // mask view: the figure is white, the shadow is not
    show_mask = 1;
    wait_done(2);
    show_mask = 0;
    expect_true("figure in mask", dut.u_va.u_mask.mem[12 * HA + 13] == 1'b1);
    expect_true("shadow not in mask", dut.u_va.u_mask.mem[12 * HA + 25] == 1'b0);
    // the figure falls and lies still
    ox0 = 8; ox1 = 29; oy0 = 18; oy1 = 25; shadow_en = 0;
    wait (fall_state[0] == S_CONFIRMED || n_done > 60);
    expect_true("fall confirmed", fall_state[0] == S_CONFIRMED);
    wait_done(2);
    // a threshold step
    thr_sel = 0;
    @(negedge vga_clk); key_inc = 1; repeat (3) @(negedge vga_clk); key_inc = 0;
    repeat (3) @(negedge vga_clk);
    expect_true("threshold step", dut.ty == 10'd41);
    // the figure leaves
    obj_en = 0;
    wait (fall_state[0] == S_NO_OBJ || n_done > 100);
    expect_true("object gone", fall_state[0] == S_NO_OBJ);
    repeat (2) @(posedge vga_clk);
    expect_true("state order 1,2,3,0", seen_order.size() >= 4 && seen_order[0] == 1 && seen_order[1] == 2 &&
                seen_order[2] == 3 && seen_order[$] == 0);
    expect_true("no FIFO overflow/underflow", !wr_overflow && !rd_underflow);
    expect_true("no SDRAM protocol error", mdl.errors == 0);
    $display("mechanisms: bg frames %0d, refreshes %0d, state counts %0d/%0d/%0d/%0d, outline green %0d yellow %0d red %0d, mask white %0d, frames done %0d",
             n_bg_frames, mdl.n_ref, n_state[0], n_state[1], n_state[2], n_state[3], n_green, n_yellow, n_red, n_white, n_done);
    expect_true("background capture happened", n_bg_frames >= 1);
    expect_true("SDRAM refresh happened", mdl.n_ref > 0);
    for (int i = 0; i < 4; i++) expect_true($sformatf("state %0d reached", i), n_state[i] > 0);
    expect_true("green outline shown", n_green > 0);
    expect_true("yellow outline shown", n_yellow > 0);
    expect_true("red outline shown", n_red > 0);
    expect_true("mask view shown", n_white > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
