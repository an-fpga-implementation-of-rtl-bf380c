// tb_fall_detection_full: the whole system at its full size, with every
// parameter of the top at its default: 1280x960 raw sensor, 640x480 at
// 25 MHz VGA timing, 512-word FIFOs, 16-word SDRAM bursts, the full SDRAM
// power-up wait and refresh period. One complete operation: the first
// whole frame after the SDRAM power-up is stored as the background, then a standing figure (with a
// shadow to its right) enters; after the display has shown a frame that
// holds the figure, the bounding box must match the figure, its state must
// be "normal", the shadow must be absent from the mask, the frame cycle
// count must read 383839 (the count at the last visible pixel of a
// 800x525 frame) and no FIFO may have overflowed or run empty.
// Clocks: camera 25 MHz, SDRAM 125 MHz, VGA 25 MHz.
module tb_fall_detection_full;
  import fd_pkg::*;
  localparam int NOBJ = 4;
  logic rst_n = 1, cam_clk = 0, sd_clk = 0, vga_clk = 0;
  logic fval, lval;
  logic [9:0] cam_data;
  logic cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [12:0] addr;
  logic [3:0] dqm;
  logic [31:0] dq_o, dq_i;
  logic [9:0] vr, vg, vb;
  logic hs_n, vs_n, blank_n, frame_done, test_pulse, wr_overflow, rd_underflow;
  fall_state_t [NOBJ-1:0] fall_state;
  obj_t [NOBJ-1:0] objects;
  logic [31:0] frame_cycles;
  int frames, n_done = 0;
  logic obj_en = 0, shadow_en = 0, cam_run = 0;
  int checks = 0, failures = 0;

  fall_detection_top dut (
    .rst_n, .cam_pixclk(cam_clk), .cam_fval(fval), .cam_lval(lval), .cam_data,
    .sd_clk, .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n),
    .sdram_ba(ba), .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o), .sdram_dq_oe(dq_oe),
    .sdram_dq_i(dq_i), .vga_clk, .key_bg_capture(1'b0), .sw_thr_sel(2'd0),
    .key_thr_inc(1'b0), .key_thr_dec(1'b0), .sw_show_mask(1'b0),
    .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs_n(hs_n), .vga_vs_n(vs_n), .vga_blank_n(blank_n),
    .fall_state, .objects, .frame_done, .test_pulse, .frame_cycles, .wr_overflow, .rd_underflow);
  sdram_model mdl (.clk(sd_clk), .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dq_o, .dq_oe, .dq_i);
  cmos_sensor_model #(.RAW_W(1280), .RAW_H(960), .H_BLANK(16), .V_BLANK(2000)) cam (
    .clk(cam_clk), .run(cam_run), .obj_en, .obj_x0(200), .obj_x1(279), .obj_y0(100), .obj_y1(399),
    .shadow_en, .shadow_x0(300), .shadow_x1(360), .fval, .lval, .data(cam_data), .frames);

  always #20 cam_clk = ~cam_clk;
  always #4 sd_clk = ~sd_clk;
  always #20 vga_clk = ~vga_clk;
  initial #1 rst_n = 0;
  always @(posedge vga_clk) if (rst_n && frame_done) n_done++;

  initial begin
    repeat (8_000_000) @(posedge vga_clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_true(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int target;

  initial begin
    #200; rst_n = 1;
    #100; cam_run = 1;                        // the camera starts streaming after reset
    // the first whole frame after the SDRAM power-up is the background
    wait (dut.u_capture.bg_frame);
    target = frames;
    obj_en = 1; shadow_en = 1;                // the frames after it hold the figure
    wait (frames >= target + 2);
    target = n_done + 2;
    wait (n_done >= target);
    $display("box x %0d..%0d y %0d..%0d, state %0d, frame cycles %0d", objects[0].xmin, objects[0].xmax,
             objects[0].ymin, objects[0].ymax, fall_state[0], frame_cycles);
    expect_true("figure box", objects[0].valid && objects[0].xmin == 200 && objects[0].xmax == 279 &&
                objects[0].ymin == 100 && objects[0].ymax == 399);
    expect_true("single object", !objects[1].valid && !objects[2].valid && !objects[3].valid);
    expect_true("state normal", fall_state[0] == S_NORMAL);
    expect_true("shadow not in mask", dut.u_va.u_mask.mem[250 * 640 + 330] == 1'b0);
    expect_true("figure in mask", dut.u_va.u_mask.mem[250 * 640 + 240] == 1'b1);
    expect_true("frame cycle count 383839", frame_cycles == 32'd383839);
    expect_true("no FIFO overflow/underflow", !wr_overflow && !rd_underflow);
    expect_true("no SDRAM protocol error", mdl.errors == 0);
    expect_true("SDRAM refreshed", mdl.n_ref > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
