// fall_detect: fall recognition and confirmation for one tracked object.
// After every processed frame (`frame_done`) the box height and width are
// turned into single-precision floats and divided, giving the aspect ratio
// H/W (above 1 for a standing person, below 1 for a lying one). The ratio is
// also kept, as 8.8 fixed point, in a HIST-frame history, so the ratio of
// one second earlier is at hand. The four-state machine then steps once:
//   0 no object  -> 1 when the object is present
//   1 normal     -> 2 on a possible fall: ratio < 1 and the ratio dropped by
//                   more than DROP_Q8/256 (0.5) against one second earlier;
//                   the centroid is noted and the inactivity time starts
//   2 recognised -> 3 once more than INACT_SEC seconds pass with the ratio
//                   still < 1 and the centroid within MOVE_PX pixels of the
//                   noted position; back to 1 if either rule breaks
//   3 confirmed  -> 1 when the ratio is no longer below 1
//   any state    -> 0 when the object is gone.
// Time comes as `tick` pulses, TICKS_PER_SEC per second. The states, the
// 0.5 drop, the 6 s and the 5-pixel rule follow the source; using H/W, the
// fixed-point history and the per-frame evaluation are this design's.
// Timing: the state is updated 28 clocks after `frame_done`; `upd` pulses
// then.
module fall_detect
  import fd_pkg::*;
#(
  parameter int          HIST          = 60,
  parameter int          INACT_SEC     = 6,
  parameter int          TICKS_PER_SEC = 10,
  parameter int          MOVE_PX       = 5,
  parameter logic [15:0] DROP_Q8       = 16'd128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_done,
  input  obj_t        obj,
  input  logic        tick,
  output fall_state_t state,
  output logic        fall_recognized,
  output logic        fall_confirmed,
  output logic [31:0] ratio_f,
  output logic [15:0] ratio_q,
  output logic        upd
);
  localparam int TICKS = INACT_SEC * TICKS_PER_SEC;
  localparam int HW    = (HIST > 1) ? $clog2(HIST) : 1;

  logic [31:0] wf, hf, qf;
  logic        div_done, busy;
  logic [15:0] hist [HIST];
  logic [HW-1:0] wp;
  logic        hist_full;
  logic [15:0] old_q, new_q;
  logic [15:0] tcnt;
  logic [10:0] anc_x, anc_y;
  logic        lt1, drop, moved;

  int2float #(.IW(16)) u_w (.a(16'(obj.width)),  .f(wf));
  int2float #(.IW(16)) u_h (.a(16'(obj.height)), .f(hf));

  fp_div u_div (.clk, .rst_n, .start(frame_done && obj.valid), .a(hf), .b(wf),
                .done(div_done), .q(qf));

  assign new_q = f32_to_q8_8(qf);
  assign old_q = hist[wp];
  assign lt1   = qf < 32'h3F80_0000;                 // positive floats order as integers
  assign drop  = hist_full && (old_q > new_q) && (old_q - new_q > DROP_Q8);
  assign moved = (obj.cent_x > anc_x + 11'(MOVE_PX)) || (anc_x > obj.cent_x + 11'(MOVE_PX)) ||
                 (obj.cent_y > anc_y + 11'(MOVE_PX)) || (anc_y > obj.cent_y + 11'(MOVE_PX));

  assign fall_recognized = (state == S_POSSIBLE);
  assign fall_confirmed  = (state == S_CONFIRMED);

  always_ff @(posedge clk) begin
    if (div_done) hist[wp] <= new_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_NO_OBJ; busy <= 1'b0; wp <= '0; hist_full <= 1'b0;
      tcnt <= '0; anc_x <= '0; anc_y <= '0; ratio_f <= '0; ratio_q <= '0; upd <= 1'b0;
    end else begin
      upd <= 1'b0;
      if (state == S_POSSIBLE && tick && tcnt != 16'hFFFF) tcnt <= tcnt + 1'b1;
      if (frame_done) begin
        if (!obj.valid) begin
          state     <= S_NO_OBJ;
          hist_full <= 1'b0;
          wp        <= '0;
          upd       <= 1'b1;
        end else busy <= 1'b1;
      end
      if (div_done && busy) begin
        busy    <= 1'b0;
        upd     <= 1'b1;
        ratio_f <= qf;
        ratio_q <= new_q;
        if (int'(wp) == HIST - 1) begin
          wp        <= '0;
          hist_full <= 1'b1;
        end else wp <= wp + 1'b1;
        unique case (state)
          S_NO_OBJ: state <= S_NORMAL;
          S_NORMAL: if (lt1 && drop) begin
            state <= S_POSSIBLE;
            anc_x <= obj.cent_x;
            anc_y <= obj.cent_y;
            tcnt  <= '0;
          end
          S_POSSIBLE: begin
            if (!lt1 || moved)                  state <= S_NORMAL;
            else if (int'(tcnt) >= TICKS + 1)   state <= S_CONFIRMED;
          end
          S_CONFIRMED: if (!lt1) state <= S_NORMAL;
          default: state <= S_NO_OBJ;
        endcase
      end
    end
  end
endmodule
