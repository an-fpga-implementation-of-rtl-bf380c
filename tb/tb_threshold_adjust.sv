// tb_threshold_adjust: button presses on each of the three thresholds,
// including holding a button (one step per press) and saturation at 0.
module tb_threshold_adjust;
  logic clk = 0, rst_n = 0, inc = 0, dec = 0;
  logic [1:0] sel = 0;
  logic [9:0] ty, tcr, tcb;
  int checks = 0, failures = 0;
  threshold_adjust #(.TY_INIT(10'd40), .TC_INIT(10'd3)) dut (.clk, .rst_n, .sel, .inc, .dec, .ty, .tcr, .tcb);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic press(input bit up, input int hold);
    @(negedge clk);
    if (up) inc = 1; else dec = 1;
    repeat (hold) @(posedge clk);
    @(negedge clk); inc = 0; dec = 0;
    repeat (2) @(posedge clk);
  endtask
  task automatic expect3(int a, int b, int c);
    #1; checks++;
    if (ty != a || tcr != b || tcb != c) begin
      failures++; $display("got %0d %0d %0d exp %0d %0d %0d", ty, tcr, tcb, a, b, c);
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    expect3(40, 3, 3);
    sel = 0; press(1, 1); press(1, 5); expect3(42, 3, 3);
    press(0, 1); expect3(41, 3, 3);
    sel = 1; for (int i = 0; i < 5; i++) press(0, 1); expect3(41, 0, 3);
    sel = 2; for (int i = 0; i < 7; i++) press(1, 1); expect3(41, 0, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
