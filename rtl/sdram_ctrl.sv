// sdram_ctrl: multi-port SDRAM controller for the two frame buffers.
// The SDRAM is two x16 devices that share command and address lines, used
// together as one 32-bit wide memory, so every port is 32 bits wide and one
// 30-bit RGB pixel is one word. There are two write ports (incoming frame,
// background frame) and two read ports (the same two frames, read together
// for background subtraction). Each port walks its frame buffer cyclically:
// its word address advances by BURST after every burst and wraps after
// FRAME_WORDS, so the camera side and the display side stay frame-aligned as
// long as neither FIFO overflows or runs dry.
//
// Scheduling (this design's choice; the command timing is not specified in
// the source): after the power-up sequence (wait, precharge-all, two
// auto-refreshes, mode register with burst length 1 and CAS latency CAS) the
// controller serves, round robin, a write port whose FIFO holds at least
// BURST words or a read port whose FIFO has room for BURST words. A burst is
// ACTIVE, tRCD wait, BURST back-to-back single-word READ/WRITE commands to
// consecutive columns of the open row, then PRECHARGE of that bank. An
// auto-refresh is slipped in between bursts every REF_CYC cycles.
// Write data is taken from first-word-fall-through FIFOs (pop = wr_pop);
// read data arrives CAS cycles after the command and is pushed into the read
// FIFO one cycle after it is sampled. The data bus is split into dq_o, dq_oe
// and dq_i; the tristate pad is outside this module.
module sdram_ctrl #(
  parameter int          DW          = 32,
  parameter int          CNT_W       = 10,
  parameter int          COL_W       = 10,
  parameter int          ROW_W       = 13,
  parameter int          BA_W        = 2,
  parameter int          BURST       = 16,
  parameter int          CAS         = 2,
  parameter int          T_RCD       = 2,
  parameter int          T_RP        = 2,
  parameter int          T_RC        = 7,
  parameter int          T_WR        = 2,
  parameter int          T_MRD       = 2,
  parameter int          REF_CYC     = 780,
  parameter int          INIT_CYC    = 20000,
  parameter int unsigned FRAME_WORDS = 307200,
  parameter int unsigned BASE0       = 0,
  parameter int unsigned BASE1       = 32'h0080_0000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // write ports: read side of the write FIFOs
  input  logic [1:0][CNT_W-1:0]  wr_avail,
  input  logic [1:0][DW-1:0]     wr_data,
  output logic [1:0]             wr_pop,
  // read ports: write side of the read FIFOs
  input  logic [1:0][CNT_W-1:0]  rd_space,
  output logic [1:0]             rd_push,
  output logic [DW-1:0]          rd_data,
  output logic                   init_done,
  // SDRAM pins
  output logic                   sdram_cs_n,
  output logic                   sdram_ras_n,
  output logic                   sdram_cas_n,
  output logic                   sdram_we_n,
  output logic [BA_W-1:0]        sdram_ba,
  output logic [ROW_W-1:0]       sdram_addr,
  output logic [DW/8-1:0]        sdram_dqm,
  output logic [DW-1:0]          sdram_dq_o,
  output logic                   sdram_dq_oe,
  input  logic [DW-1:0]          sdram_dq_i
);
  localparam int AW = BA_W + ROW_W + COL_W;
  typedef logic [3:0] cmd_t;   // {cs_n, ras_n, cas_n, we_n}
  localparam cmd_t C_NOP = 4'b0111, C_ACT = 4'b0011, C_RD = 4'b0101, C_WR = 4'b0100,
                   C_PRE = 4'b0010, C_REF = 4'b0001, C_MRS = 4'b0000;

  typedef enum logic [3:0] {
    ST_INIT, ST_INIT_PRE, ST_INIT_REF1, ST_INIT_REF2, ST_INIT_MRS,
    ST_IDLE, ST_ACT, ST_XFER, ST_WREC, ST_PRE, ST_REF, ST_WAIT
  } st_t;

  st_t                    st, ret_st;
  logic [15:0]            wait_cnt;
  logic [15:0]            ref_cnt;
  logic                   ref_due;
  logic [1:0]             sel;        // port index within its kind
  logic                   sel_rd;     // 1: read port
  logic [1:0]             rr;         // round-robin pointer over 4 requesters
  logic [AW-1:0]          offs [4];   // per-requester frame offset (wr0, wr1, rd0, rd1)
  logic [AW-1:0]          cur_addr;
  logic [$clog2(BURST):0] k;
  logic [CAS:0]           tok;
  logic [CAS:0][0:0]      tok_port;
  cmd_t                   cmd;

  assign {sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n} = cmd;
  assign sdram_dqm = '0;

  // requester readiness and round-robin choice
  logic [3:0] ready;
  logic [1:0] pick;
  logic       any;
  always_comb begin
    ready[0] = wr_avail[0] >= CNT_W'(BURST);
    ready[1] = wr_avail[1] >= CNT_W'(BURST);
    ready[2] = rd_space[0] >= CNT_W'(BURST);
    ready[3] = rd_space[1] >= CNT_W'(BURST);
    any  = 1'b0;
    pick = rr;
    for (int i = 3; i >= 0; i--) begin
      if (ready[2'(rr + 2'(i))]) begin
        any  = 1'b1;
        pick = 2'(rr + 2'(i));
      end
    end
  end

  function automatic logic [AW-1:0] base_of(input logic [1:0] r);
    return AW'(r[0] ? BASE1 : BASE0);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= ST_INIT; ret_st <= ST_INIT; wait_cnt <= '0; ref_cnt <= '0; ref_due <= 1'b0;
      sel <= '0; sel_rd <= 1'b0; rr <= '0; cur_addr <= '0; k <= '0;
      for (int i = 0; i < 4; i++) offs[i] <= '0;
      cmd <= C_NOP; sdram_ba <= '0; sdram_addr <= '0; sdram_dq_o <= '0; sdram_dq_oe <= 1'b0;
      init_done <= 1'b0;
    end else begin
      cmd         <= C_NOP;
      sdram_dq_oe <= 1'b0;
      if (init_done) begin
        if (ref_cnt >= 16'(REF_CYC - 1)) begin
          ref_cnt <= '0;
          ref_due <= 1'b1;
        end else begin
          ref_cnt <= ref_cnt + 1'b1;
        end
      end
      unique case (st)
        ST_INIT: begin
          if (wait_cnt >= 16'(INIT_CYC)) begin
            wait_cnt <= '0;
            st <= ST_INIT_PRE;
          end else wait_cnt <= wait_cnt + 1'b1;
        end
        ST_INIT_PRE: begin
          cmd <= C_PRE; sdram_addr <= '0; sdram_addr[10] <= 1'b1;
          wait_cnt <= 16'(T_RP - 1); ret_st <= ST_INIT_REF1; st <= ST_WAIT;
        end
        ST_INIT_REF1: begin
          cmd <= C_REF; wait_cnt <= 16'(T_RC - 1); ret_st <= ST_INIT_REF2; st <= ST_WAIT;
        end
        ST_INIT_REF2: begin
          cmd <= C_REF; wait_cnt <= 16'(T_RC - 1); ret_st <= ST_INIT_MRS; st <= ST_WAIT;
        end
        ST_INIT_MRS: begin
          // burst length 1, sequential, CAS latency CAS, write burst = programmed
          cmd <= C_MRS; sdram_ba <= '0;
          sdram_addr <= ROW_W'({3'(CAS), 1'b0, 3'b000});
          wait_cnt <= 16'(T_MRD - 1); ret_st <= ST_IDLE; st <= ST_WAIT;
        end
        ST_WAIT: begin
          if (wait_cnt <= 16'd1) begin
            st <= ret_st;
            if (ret_st == ST_IDLE) init_done <= 1'b1;
          end
          wait_cnt <= wait_cnt - 1'b1;
        end
        ST_IDLE: begin
          if (ref_due) begin
            ref_due <= 1'b0;
            cmd <= C_REF;
            wait_cnt <= 16'(T_RC - 1); ret_st <= ST_IDLE; st <= ST_WAIT;
          end else if (any) begin
            sel      <= {1'b0, pick[0]};
            sel_rd   <= pick[1];
            rr       <= pick + 2'd1;
            cur_addr <= base_of(pick) + offs[pick];
            st       <= ST_ACT;
          end
        end
        ST_ACT: begin
          cmd        <= C_ACT;
          sdram_ba   <= cur_addr[AW-1 -: BA_W];
          sdram_addr <= cur_addr[COL_W +: ROW_W];
          k          <= '0;
          if (T_RCD > 1) begin
            wait_cnt <= 16'(T_RCD - 1); ret_st <= ST_XFER; st <= ST_WAIT;
          end else st <= ST_XFER;
        end
        ST_XFER: begin
          sdram_addr <= ROW_W'(cur_addr[COL_W-1:0] + COL_W'(k));
          sdram_ba   <= cur_addr[AW-1 -: BA_W];
          if (sel_rd) begin
            cmd <= C_RD;
          end else begin
            cmd         <= C_WR;
            sdram_dq_o  <= wr_data[sel[0]];
            sdram_dq_oe <= 1'b1;
          end
          k <= k + 1'b1;
          if (k == ($clog2(BURST)+1)'(BURST - 1)) begin
            if (offs[{sel_rd, sel[0]}] + AW'(BURST) >= AW'(FRAME_WORDS))
              offs[{sel_rd, sel[0]}] <= '0;
            else
              offs[{sel_rd, sel[0]}] <= offs[{sel_rd, sel[0]}] + AW'(BURST);
            if (sel_rd) st <= ST_PRE;
            else begin
              wait_cnt <= 16'(T_WR); ret_st <= ST_PRE; st <= ST_WAIT;
            end
          end
        end
        ST_PRE: begin
          cmd <= C_PRE;
          sdram_addr[10] <= 1'b0;
          wait_cnt <= 16'(T_RP); ret_st <= ST_IDLE; st <= ST_WAIT;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  // write data is popped in the cycle its WRITE command is registered
  always_comb begin
    wr_pop = '0;
    if (st == ST_XFER && !sel_rd) wr_pop[sel[0]] = 1'b1;
  end

  // read data return: a token per READ command, CAS+1 cycles to the sample
  logic issue_rd;
  assign issue_rd = (st == ST_XFER) && sel_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok <= '0; tok_port <= '0; rd_push <= '0; rd_data <= '0;
    end else begin
      tok      <= {tok[CAS-1:0], issue_rd};
      tok_port <= {tok_port[CAS-1:0], sel[0]};
      rd_push  <= '0;
      if (tok[CAS]) begin
        rd_push[tok_port[CAS]] <= 1'b1;
        rd_data                <= sdram_dq_i;
      end
    end
  end
endmodule
