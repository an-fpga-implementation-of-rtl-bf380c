// image_capture: front end of the parallel camera interface.
// Samples the sensor's raw Bayer data on its pixel clock while frame-valid
// and line-valid are high, and tags each sample with its raw column and row.
// Capture starts only at the first rising edge of frame-valid after reset,
// so every frame that is passed on is complete. It also decides which frames
// become the background model: the first complete frame after reset, and the
// next complete frame after each capture request (the design's reading of
// "the first image frame with no foreground object is captured").
// Samples beyond RAW_W columns or RAW_H rows are dropped, so a sensor that
// sends a larger window cannot push more than one frame of pixels into the
// frame buffers (which would break their frame alignment).
// The frame-valid / line-valid sensor interface is this design's assumption.
// Timing: outputs are registered, one pixel-clock after the sample.
module image_capture #(
  parameter int RAW_W = 1280,
  parameter int RAW_H = 960,
  parameter int DW    = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fval,
  input  logic               lval,
  input  logic [DW-1:0]      data,
  input  logic               bg_req,      // level or pulse, sensor clock domain
  output logic               raw_valid,
  output logic [10:0]        raw_x,
  output logic [10:0]        raw_y,
  output logic [DW-1:0]      raw,
  output logic               bg_frame,    // current frame is a background frame
  output logic [15:0]        frame_count
);
  logic        fval_q, lval_q, running, bg_pend;
  logic [10:0] xc, yc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fval_q <= 1'b1; lval_q <= 1'b0; running <= 1'b0;
      xc <= '0; yc <= '0; raw_valid <= 1'b0; raw_x <= '0; raw_y <= '0; raw <= '0;
      bg_pend <= 1'b1; bg_frame <= 1'b0; frame_count <= '0;
    end else begin
      fval_q <= fval;
      lval_q <= lval;
      raw_valid <= 1'b0;
      if (bg_req) bg_pend <= 1'b1;
      if (fval && !fval_q) begin           // start of frame
        running  <= 1'b1;
        xc <= '0; yc <= '0;
        bg_frame <= bg_pend;
        bg_pend  <= bg_req;
      end else if (!fval && fval_q && running) begin
        frame_count <= frame_count + 1'b1;
      end
      if (fval && lval && (running || !fval_q) && xc < 11'(RAW_W) && yc < 11'(RAW_H)) begin
        raw_valid <= 1'b1;
        raw_x     <= xc;
        raw_y     <= yc;
        raw       <= data;
        xc        <= xc + 1'b1;
      end
      if (!lval && lval_q && running) begin  // end of line
        xc <= '0;
        yc <= yc + 1'b1;
      end
    end
  end
endmodule
