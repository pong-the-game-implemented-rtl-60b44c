// paddle2: the computer's paddle.
//
// A paddle (see paddle.sv) whose move requests come from a ball-tracking rule
// instead of the keyboard: when the ball is below the paddle's centre the
// paddle is asked to move down, when it is above it is asked to move up, and
// when the rows are equal it stays. The paddle then moves once per frame at
// SPEED pixels, within the same screen limits as the player's paddle. Since
// the ball moves faster (3 pixels per frame) than the paddle (2), the
// computer can be beaten.
//
// Interface: as paddle, with ball_y_pos (the ball's centre row) in place of
// the move flags. The tracking rule is combinational, so the decision uses the
// ball and paddle rows of the current frame.
//
// Tracking rule, column (40), start row (200) and speed follow the original;
// building it as a paddle instance plus the rule is this design's choice.
module paddle2
  import pong_pkg::*;
#(
  parameter int unsigned X_POS   = COMPUTER_X,
  parameter int unsigned START_Y = COMPUTER_START_Y,
  parameter int unsigned SPEED   = PADDLE_SPEED
) (
  input  logic   clk,
  input  logic   reset_n,
  input  logic   frame_tick,
  input  coord_t ball_y_pos,
  input  coord_t pixel_row,
  input  coord_t pixel_column,
  output logic   red,
  output logic   green,
  output logic   blue,
  output coord_t paddle_y_pos_out
);

  logic move_up, move_down;

  // Track the ball: screen rows grow downwards
  assign move_down = (ball_y_pos > paddle_y_pos_out);
  assign move_up   = (ball_y_pos < paddle_y_pos_out);

  paddle #(
    .X_POS  (X_POS),
    .START_Y(START_Y),
    .SPEED  (SPEED)
  ) u_paddle (
    .clk             (clk),
    .reset_n         (reset_n),
    .frame_tick      (frame_tick),
    .move_up         (move_up),
    .move_down       (move_down),
    .pixel_row       (pixel_row),
    .pixel_column    (pixel_column),
    .red             (red),
    .green           (green),
    .blue            (blue),
    .paddle_y_pos_out(paddle_y_pos_out)
  );

endmodule
