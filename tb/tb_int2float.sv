// tb_int2float: every 16-bit integer is converted and the float's value,
// decoded independently as (1 + frac/2^23) * 2^(exp-127), must equal it.
module tb_int2float;
  logic [15:0] a;
  logic [31:0] f;
  int checks = 0, failures = 0;
  int2float #(.IW(16)) dut (.a, .f);
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic real pow2(int e);
    real r; r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction
  initial begin
    real v;
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i);
      #1;
      if (i == 0) v = (f == 0) ? 0.0 : -1.0;
      else v = (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
      checks++;
      if (v != real'(i) || f[31]) begin
        failures++;
        if (failures < 10) $display("mismatch %0d -> %h", i, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
