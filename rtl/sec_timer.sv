// sec_timer: time base for the inactivity period.
// Divides the processing clock (CLK_HZ) into TICKS_PER_SEC one-clock ticks
// per second. The fall detectors count these ticks, so the inactivity time
// is measured to 1/TICKS_PER_SEC of a second. The source only shows a timer
// beside the fall detection; the tick rate is this design's choice.
module sec_timer #(
  parameter int CLK_HZ        = 25_000_000,
  parameter int TICKS_PER_SEC = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int DIV = CLK_HZ / TICKS_PER_SEC;
  logic [$clog2(DIV+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (cnt == $bits(cnt)'(DIV - 1)) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
