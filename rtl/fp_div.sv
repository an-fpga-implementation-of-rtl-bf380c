// fp_div: single-precision floating-point divider, q = a / b.
// Serves the aspect-ratio computation in place of a library divider. The
// sign is the XOR of the signs, the exponent the difference of exponents,
// and the 1.23 mantissas are divided by a restoring loop that yields 25
// quotient bits, one per clock; the result is normalised by at most one
// place and truncated. Operands are expected to be normal numbers (box
// sizes are); a = 0 gives 0, b = 0 gives infinity, and exponents are
// clamped to the normal range. `done` pulses 27 clocks after the edge that takes `start`.
module fp_div (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        done,
  output logic [31:0] q
);
  typedef enum logic [1:0] {IDLE, RUN, NORM} st_t;
  st_t          st;
  logic         sgn, special;
  logic [31:0]  special_q;
  logic [9:0]   ex;          // biased exponent with headroom, signed sense
  logic [24:0]  rem;
  logic [23:0]  mb;
  logic [24:0]  quo;
  logic [4:0]   cnt;
  logic [9:0]   e;           // normalised exponent
  logic [22:0]  m;           // normalised fraction

  always_comb begin
    if (quo[24]) begin
      e = ex;
      m = quo[23:1];
    end else begin
      e = ex - 10'd1;
      m = quo[22:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; sgn <= 1'b0; special <= 1'b0; special_q <= '0; ex <= '0;
      rem <= '0; mb <= '0; quo <= '0; cnt <= '0; done <= 1'b0; q <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          sgn       <= a[31] ^ b[31];
          special   <= (a[30:23] == 8'd0) || (b[30:23] == 8'd0);
          special_q <= (a[30:23] == 8'd0) ? {a[31] ^ b[31], 31'd0}
                                          : {a[31] ^ b[31], 8'hFF, 23'd0};
          ex        <= 10'(a[30:23]) - 10'(b[30:23]) + 10'd127;
          rem       <= {1'b0, 1'b1, a[22:0]};
          mb        <= {1'b1, b[22:0]};
          quo       <= '0;
          cnt       <= '0;
          st        <= RUN;
        end
        RUN: begin
          if (rem >= {1'b0, mb}) begin
            rem <= (rem - {1'b0, mb}) << 1;
            quo <= {quo[23:0], 1'b1};
          end else begin
            rem <= rem << 1;
            quo <= {quo[23:0], 1'b0};
          end
          cnt <= cnt + 1'b1;
          if (cnt == 5'd24) st <= NORM;
        end
        NORM: begin
          if (special)                        q <= special_q;
          else if (e[9] || e == 10'd0)        q <= {sgn, 31'd0};          // underflow
          else if (e >= 10'd255)              q <= {sgn, 8'hFF, 23'd0};   // overflow
          else                                q <= {sgn, e[7:0], m};
          done <= 1'b1;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
