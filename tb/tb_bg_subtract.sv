// tb_bg_subtract: random luma/chroma pairs and thresholds against the
// classification rule (luma difference above Ty; darker pixels must also
// differ in Cr or Cb), plus directed shadow and bright-object cases.
module tb_bg_subtract;
  import fd_pkg::*;
  logic clk = 0;
  ycc_t cur, bg;
  logic [9:0] ty, tcr, tcb;
  logic fg;
  int checks = 0, failures = 0;
  bg_subtract dut (.clk, .cur, .bg, .ty, .tcr, .tcb, .fg);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic bit model(ycc_t c, ycc_t b, int t_y, int t_cr, int t_cb);
    int dy, dcr, dcb;
    dy  = int'(c.y) - int'(b.y);
    dcr = int'($signed(c.cr)) - int'($signed(b.cr)); if (dcr < 0) dcr = -dcr;
    dcb = int'($signed(c.cb)) - int'($signed(b.cb)); if (dcb < 0) dcb = -dcb;
    if (dy > t_y) return 1;
    if (-dy > t_y) return (dcr > t_cr) || (dcb > t_cb);
    return 0;
  endfunction
  task automatic check(ycc_t c, ycc_t b, bit expect_fg);
    cur = c; bg = b;
    @(posedge clk); #1;
    checks++;
    if (fg !== expect_fg) begin
      failures++;
      $display("mismatch y %0d/%0d cr %0d/%0d cb %0d/%0d got %0d", c.y, b.y, c.cr, b.cr, c.cb, b.cb, fg);
    end
  endtask
  initial begin
    ty = 40; tcr = 12; tcb = 12;
    // shadow: much darker, same chroma -> background
    check('{y: 10'd200, cr: 11'd20, cb: 11'h7F6}, '{y: 10'd400, cr: 11'd22, cb: 11'h7F8}, 0);
    // darker with chroma change -> foreground
    check('{y: 10'd200, cr: 11'd60, cb: 11'h7F6}, '{y: 10'd400, cr: 11'd22, cb: 11'h7F8}, 1);
    // brighter -> foreground
    check('{y: 10'd500, cr: 11'd22, cb: 11'h7F8}, '{y: 10'd400, cr: 11'd22, cb: 11'h7F8}, 1);
    // small difference -> background
    check('{y: 10'd420, cr: 11'd90, cb: 11'h7F8}, '{y: 10'd400, cr: 11'd22, cb: 11'h7F8}, 0);
    for (int n = 0; n < 3000; n++) begin
      ycc_t c, b;
      c.y = 10'($urandom); c.cr = 11'($urandom_range(0, 1000) - 500);
      c.cb = 11'($urandom_range(0, 1000) - 500);
      b.y = 10'($urandom); b.cr = 11'($urandom_range(0, 1000) - 500);
      b.cb = 11'($urandom_range(0, 1000) - 500);
      ty = 10'($urandom_range(0, 300)); tcr = 10'($urandom_range(0, 300)); tcb = 10'($urandom_range(0, 300));
      check(c, b, model(c, b, ty, tcr, tcb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
