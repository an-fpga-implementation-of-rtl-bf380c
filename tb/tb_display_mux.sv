// tb_display_mux: two boxes in different fall states over a camera colour
// and over the mask; every screen position of a 40x30 area is checked for
// the outline colour (green / yellow / red), the camera pixel or the mask.
module tb_display_mux;
  import fd_pkg::*;
  localparam int N = 2;
  logic clk = 0, mode = 0, mask = 0;
  logic [10:0] x = 0, y = 0;
  rgb_t cam, pix;
  obj_t [N-1:0] obj;
  fall_state_t [N-1:0] st;
  int checks = 0, failures = 0;
  display_mux #(.NUM_OBJ(N)) dut (.clk, .mode, .x, .y, .cam, .mask, .obj, .st, .pix);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic bit on_edge(int i, int px, int py);
    return obj[i].valid && (((px == obj[i].xmin || px == obj[i].xmax) && py >= obj[i].ymin && py <= obj[i].ymax) ||
                            ((py == obj[i].ymin || py == obj[i].ymax) && px >= obj[i].xmin && px <= obj[i].xmax));
  endfunction
  initial begin
    rgb_t e;
    obj = '0;
    obj[0].valid = 1; obj[0].xmin = 5; obj[0].xmax = 15; obj[0].ymin = 4; obj[0].ymax = 20;
    obj[1].valid = 1; obj[1].xmin = 20; obj[1].xmax = 35; obj[1].ymin = 10; obj[1].ymax = 14;
    for (int m = 0; m < 2; m++) for (int s = 0; s < 4; s++) begin
      st[0] = fall_state_t'(s); st[1] = fall_state_t'((s + 2) % 4); mode = m[0];
      for (int py = 0; py < 30; py++) for (int px = 0; px < 40; px++) begin
        @(negedge clk);
        x = 11'(px); y = 11'(py); cam = '{10'(px * 7), 10'(py * 9), 10'(px + py)}; mask = ((px + py) % 3 == 0);
        e = mode ? (mask ? '{10'h3FF, 10'h3FF, 10'h3FF} : '{10'h0, 10'h0, 10'h0}) : cam;
        for (int i = 0; i < N; i++)
          if (on_edge(i, px, py))
            e = (st[i] == S_CONFIRMED) ? '{10'h3FF, 10'h0, 10'h0} :
                (st[i] == S_POSSIBLE)  ? '{10'h3FF, 10'h3FF, 10'h0} : '{10'h0, 10'h3FF, 10'h0};
        @(posedge clk); #1;
        checks++;
        if (pix != e) begin failures++; if (failures < 10) $display("mismatch at %0d,%0d", px, py); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
