// tb_sec_timer: a 100 Hz clock with 10 ticks per second must tick exactly
// every 10 clocks, one clock wide.
module tb_sec_timer;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0;
  sec_timer #(.CLK_HZ(100), .TICKS_PER_SEC(10)) dut (.clk, .rst_n, .tick);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int last, n, cyc;
    repeat (2) @(posedge clk); rst_n = 1;
    last = -1; n = 0; cyc = 0;
    while (n < 50) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != 10) begin failures++; $display("spacing %0d", cyc - last); end
        end
        last = cyc; n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
