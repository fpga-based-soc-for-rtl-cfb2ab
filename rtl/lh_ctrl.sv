// Control FSM of the LH module: generates WE/EN, Sel and Reset.
//
// States:
//   IDLE  - waiting for frame_start; Sel = 0.
//   ACCUM - histogram accumulation. WE (memory) / EN (counters) is the
//           pipeline's valid bit at the histogram stage, so it turns on when
//           the first pixel's gray level and region number (and, for the
//           memory version, its bin address) have come through the colour
//           conversion and region detection latency. Leaves when the frame's
//           last pixel has been counted.
//   XFER  - Sel = 1: starts the distance calculation; for the register
//           version Reset clears the counters in this same cycle, after their
//           vector has been copied.
//   DIST  - Sel = 1 until the distance block reports done; Sel returns to 0
//           at the end of the distance calculation, and done pulses.
// The signal roles follow the document ("a simple finite state machine");
// the state encoding is this design's own.
//
// Interface: frame_start is accepted in IDLE only; clear_pos restarts the
// region detector's pixel counters at the same time.
module lh_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic frame_start,
  input  logic hist_valid,     // a pixel reaches the histogram stage
  input  logic hist_last,      // ... and it is the frame's last pixel
  input  logic dist_done,
  output logic clear_pos,
  output logic en,             // WE / EN
  output logic sel,            // 0 accumulate, 1 distance
  output logic cnt_reset,      // Reset of the counter version
  output logic dist_start,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {IDLE, ACCUM, XFER, DIST} state_e;
  state_e state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:  if (frame_start)             state_n = ACCUM;
      ACCUM: if (hist_valid && hist_last) state_n = XFER;
      XFER:                               state_n = DIST;
      DIST:  if (dist_done)               state_n = IDLE;
      default:                            state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_n;
  end

  assign clear_pos  = (state == IDLE) && frame_start;
  assign en         = (state == ACCUM) && hist_valid;
  assign sel        = (state == XFER) || (state == DIST);
  assign cnt_reset  = (state == XFER);
  assign dist_start = (state == XFER);
  assign busy       = (state != IDLE);
  assign done       = (state == DIST) && dist_done;

endmodule
