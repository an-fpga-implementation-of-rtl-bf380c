// tb_fp_div: random positive integer ratios (as box sizes) are divided and
// the quotient, decoded independently, must be within one unit in the last
// place below the exact value (truncation); done must come 28 clocks after the clock
// in which start is driven (27 after the edge that takes it).
module tb_fp_div;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] a, b, q;
  int checks = 0, failures = 0;
  fp_div dut (.clk, .rst_n, .start, .a, .b, .done, .q);
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] to_f(int v);
    int m; logic [31:0] r;
    m = 0;
    for (int i = 0; i < 31; i++) if (v >= (1 << i)) m = i;
    r = {1'b0, 8'(127 + m), 23'((longint'(v) << (23 - m)) & 64'h7FFFFF)};
    return r;
  endfunction
  function automatic real pow2(int e);
    real r; r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction
  function automatic real val(logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
  endfunction
  initial begin
    int x, y, cyc;
    real exact, got;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      x = $urandom_range(1, 2000); y = $urandom_range(1, 2000);
      if (n == 0) begin x = 30; y = 10; end
      if (n == 1) begin x = 10; y = 30; end
      a = to_f(x); b = to_f(y);
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      exact = real'(x) / real'(y);
      got   = val(q);
      checks++;
      if (got > exact || (exact - got) > exact * 2.4e-7 || cyc != 28) begin
        failures++;
        if (failures < 10) $display("mismatch %0d/%0d got %f exp %f cycles %0d", x, y, got, exact, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
