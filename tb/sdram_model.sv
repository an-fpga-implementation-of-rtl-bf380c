// sdram_model: behavioural model of the 32-bit SDRAM (two x16 devices side
// by side) for simulation only. It decodes the commands on the rising
// clock edge, keeps the open row of every bank, stores written words, and
// returns read data CAS clocks after the READ command (burst length 1).
// It counts protocol errors (access to a closed bank, ACTIVE to an open
// bank, READ/WRITE sooner than T_RCD after ACTIVE, anything before the mode
// register is set) and refresh commands. Only the low ROW_STORE row bits
// are stored, which is enough for two frame buffers.
module sdram_model #(
  parameter int COL_W     = 10,
  parameter int ROW_W     = 13,
  parameter int BA_W      = 2,
  parameter int ROW_STORE = 9,
  parameter int CAS       = 2,
  parameter int T_RCD     = 2
) (
  input  logic             clk,
  input  logic             cs_n,
  input  logic             ras_n,
  input  logic             cas_n,
  input  logic             we_n,
  input  logic [BA_W-1:0]  ba,
  input  logic [ROW_W-1:0] addr,
  input  logic [31:0]      dq_o,
  input  logic             dq_oe,
  output logic [31:0]      dq_i
);
  localparam int MW = BA_W + ROW_STORE + COL_W;
  logic [31:0]      mem [2**MW];
  logic [ROW_W-1:0] open_row [2**BA_W];
  bit               is_open [2**BA_W];
  int               act_time [2**BA_W];
  logic [31:0]      pipe [CAS];
  bit               mode_set = 0;
  int               errors = 0, n_ref = 0, n_act = 0, n_rd = 0, n_wr = 0, cyc = 0;

  assign dq_i = pipe[CAS-1];

  function automatic logic [MW-1:0] idx(logic [BA_W-1:0] b, logic [ROW_W-1:0] r, logic [ROW_W-1:0] c);
    return {b, r[ROW_STORE-1:0], c[COL_W-1:0]};
  endfunction

  initial for (int i = 0; i < 2**BA_W; i++) is_open[i] = 0;

  always @(posedge clk) begin
    logic [31:0] rd;
    cyc++;
    rd = 32'hDEAD_BEEF;
    if (!cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin                                   // ACTIVE
          if (!mode_set || is_open[ba]) begin errors++; $display("sdram: bad ACTIVE bank %0d", ba); end
          is_open[ba] = 1; open_row[ba] = addr; act_time[ba] = cyc; n_act++;
        end
        3'b101, 3'b100: begin                           // READ / WRITE
          if (!is_open[ba] || cyc - act_time[ba] < T_RCD) begin
            errors++; $display("sdram: access to bank %0d not ready", ba);
          end
          if (we_n) begin
            rd = mem[idx(ba, open_row[ba], addr)]; n_rd++;
          end else begin
            if (!dq_oe) begin errors++; $display("sdram: write without data"); end
            mem[idx(ba, open_row[ba], addr)] = dq_o; n_wr++;
          end
        end
        3'b010: begin                                   // PRECHARGE
          if (addr[10]) for (int i = 0; i < 2**BA_W; i++) is_open[i] = 0;
          else is_open[ba] = 0;
        end
        3'b001: begin                                   // AUTO REFRESH
          for (int i = 0; i < 2**BA_W; i++) if (is_open[i]) begin errors++; $display("sdram: refresh with open bank"); end
          n_ref++;
        end
        3'b000: begin                                   // LOAD MODE
          if (int'(addr[6:4]) != CAS || addr[2:0] != 3'b000) begin errors++; $display("sdram: unexpected mode %h", addr); end
          mode_set = 1;
        end
        default: ;
      endcase
    end
    for (int i = CAS - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= rd;
  end
endmodule
