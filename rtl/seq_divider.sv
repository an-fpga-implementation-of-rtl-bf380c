// seq_divider: unsigned restoring divider, one quotient bit per clock.
// `start` loads the operands; `done` pulses N clocks later with
// q = a / b and r = a % b (division by zero gives q = all ones, r = a).
// `busy` is high while a division runs; a start while busy is ignored.
module seq_divider #(
  parameter int N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] q,
  output logic [N-1:0] r
);
  logic [N-1:0]         dvd, dvs;
  logic [N:0]           rem;
  logic [$clog2(N+1)-1:0] cnt;
  logic [N:0]           trial;

  assign trial = {rem[N-1:0], dvd[N-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd <= '0; dvs <= '0; rem <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        dvd <= a; dvs <= b; rem <= '0; cnt <= '0; busy <= 1'b1;
      end else if (busy) begin
        // shift in the next dividend bit, subtract when possible
        if (trial >= {1'b0, dvs}) begin
          rem <= trial - {1'b0, dvs};
          dvd <= {dvd[N-2:0], 1'b1};
        end else begin
          rem <= trial;
          dvd <= {dvd[N-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // after N steps the quotient bits have been shifted into dvd
  always_comb begin
    q = dvd;
    r = rem[N-1:0];
  end
endmodule
