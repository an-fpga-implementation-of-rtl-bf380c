// tb_onchip_mem: random writes to a 40x30 mask store, compared with a
// shadow array on registered reads (one clock after the address).
module tb_onchip_mem;
  localparam int W = 40, H = 30;
  logic clk = 0, we = 0, wbit = 0, rbit;
  logic [10:0] wx = 0, wy = 0, rx = 0, ry = 0;
  bit ref_m [W*H];
  int checks = 0, failures = 0;
  onchip_mem #(.W(W), .H(H)) dut (.clk, .we, .wx, .wy, .wbit, .rx, .ry, .rbit);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); we = 1; wx = 11'(x); wy = 11'(y); wbit = 1'($urandom); ref_m[y*W+x] = wbit;
    end
    for (int n = 0; n < 3000; n++) begin
      int x, y;
      @(negedge clk);
      we = 1'($urandom); wx = 11'($urandom_range(0, W-1)); wy = 11'($urandom_range(0, H-1)); wbit = 1'($urandom);
      x = $urandom_range(0, W-1); y = $urandom_range(0, H-1);
      rx = 11'(x); ry = 11'(y);
      @(posedge clk); #1;
      checks++;
      if (rbit != ref_m[y*W+x]) begin failures++; $display("mismatch %0d,%0d", x, y); end
      if (we) ref_m[int'(wy)*W+int'(wx)] = wbit;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
