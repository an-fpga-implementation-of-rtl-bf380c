// tb_sdram_ctrl: the controller against the SDRAM model with 64-word
// frames and bursts of 8. Both write ports are fed from queues (as the
// write FIFOs would), while the read ports are held off; then both read
// ports drain two frames each. Read port 0 must return frame A and read
// port 1 frame B, in order and wrapping; the model must see no protocol
// error, and auto-refresh must come about every REF_CYC clocks.
module tb_sdram_ctrl;
  localparam int F = 64, BURST = 8, CNT_W = 10, REF = 100;
  logic clk = 0, rst_n = 0;
  logic [1:0][CNT_W-1:0] wr_avail, rd_space;
  logic [1:0][31:0] wr_data;
  logic [1:0] wr_pop, rd_push;
  logic [31:0] rd_data;
  logic init_done;
  logic cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [12:0] addr;
  logic [3:0] dqm;
  logic [31:0] dq_o, dq_i;
  int checks = 0, failures = 0, wq[2], rq[2], cyc = 0;
  bit reads_on = 0;
  sdram_ctrl #(.CNT_W(CNT_W), .BURST(BURST), .REF_CYC(REF), .INIT_CYC(50), .FRAME_WORDS(F)) dut (
    .clk, .rst_n, .wr_avail, .wr_data, .wr_pop, .rd_space, .rd_push, .rd_data, .init_done,
    .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n), .sdram_ba(ba),
    .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o), .sdram_dq_oe(dq_oe), .sdram_dq_i(dq_i));
  sdram_model mdl (.clk, .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dq_o, .dq_oe, .dq_i);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] word(int port, int i);
    return {8'(port + 1), 24'(i * 77 + 5)};
  endfunction
  // write queues: port p has F words to give; data = word(p, next index)
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      wr_avail[p] = CNT_W'(F - wq[p]);
      wr_data[p]  = word(p, wq[p]);
      rd_space[p] = reads_on ? CNT_W'(32) : '0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int p = 0; p < 2; p++) if (wr_pop[p]) wq[p] <= wq[p] + 1;
    for (int p = 0; p < 2; p++) if (rd_push[p]) begin
      checks++;
      if (rd_data != word(p, rq[p] % F)) begin
        failures++; $display("port %0d word %0d: got %h exp %h", p, rq[p], rd_data, word(p, rq[p] % F));
      end
      rq[p]++;
    end
  end
  initial begin
    wq[0] = 0; wq[1] = 0; rq[0] = 0; rq[1] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (wq[0] == F && wq[1] == F);
    repeat (20) @(posedge clk);
    reads_on = 1;
    wait (rq[0] >= 2 * F && rq[1] >= 2 * F);
    repeat (20) @(posedge clk);
    checks++;
    if (mdl.errors != 0) begin failures++; $display("%0d protocol errors", mdl.errors); end
    checks++;
    if (mdl.n_ref < cyc / REF - 2 || mdl.n_ref > cyc / REF + 3) begin
      failures++; $display("%0d refreshes in %0d cycles", mdl.n_ref, cyc);
    end
    checks++;
    if (mdl.n_wr != 2 * F) begin failures++; $display("%0d writes", mdl.n_wr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
