// paddle: one vertical paddle of the Pong game.
//
// Holds the paddle's vertical centre position, moves it once per frame
// according to two request flags, and draws the paddle as a white bar.
//
// How it works: on each frame_tick, if move_up is set and the centre is
// below the top limit (y > PADDLE_SIZE_Y) the centre moves up by SPEED;
// otherwise, if move_down is set and the centre is not past the bottom limit
// (y <= SCREEN_H - PADDLE_SIZE_Y) it moves down by SPEED. move_up wins when
// both are set. The drawing test is combinational: the pixel at (pixel_column,
// pixel_row) is lit when it lies within PADDLE_SIZE_X columns and
// PADDLE_SIZE_Y rows of the centre, so the bar is 9 pixels wide and 65 tall.
//
// Interface: reset_n is active low and puts the paddle at START_Y. frame_tick
// is a one-clock pulse per video frame. paddle_y_pos_out is the registered
// centre row; red/green/blue are the same signal (white).
//
// The limits, step, size and start rows follow the original paddle; the
// synchronous frame_tick enable (instead of clocking on the sync pulse) and
// the asynchronous reset are this design's own.
module paddle
  import pong_pkg::*;
#(
  parameter int unsigned X_POS   = PLAYER_X,
  parameter int unsigned START_Y = PLAYER_START_Y,
  parameter int unsigned SPEED   = PADDLE_SPEED
) (
  input  logic   clk,
  input  logic   reset_n,
  input  logic   frame_tick,
  input  logic   move_up,
  input  logic   move_down,
  input  coord_t pixel_row,
  input  coord_t pixel_column,
  output logic   red,
  output logic   green,
  output logic   blue,
  output coord_t paddle_y_pos_out
);

  coord_t y_pos;
  logic   paddle_on;

  assign paddle_y_pos_out = y_pos;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      y_pos <= coord_t'(START_Y);
    end else if (frame_tick) begin
      if (move_up && y_pos > coord_t'(PADDLE_SIZE_Y))
        y_pos <= y_pos - coord_t'(SPEED);
      else if (move_down && y_pos <= coord_t'(SCREEN_H - PADDLE_SIZE_Y))
        y_pos <= y_pos + coord_t'(SPEED);
    end
  end

  // Drawing: 11-bit sums so that nothing wraps
  always_comb begin
    paddle_on = ({1'b0, coord_t'(X_POS)} <= {1'b0, pixel_column} + 11'(PADDLE_SIZE_X)) &&
                ({1'b0, pixel_column}    <= 11'(X_POS) + 11'(PADDLE_SIZE_X)) &&
                ({1'b0, y_pos}           <= {1'b0, pixel_row} + 11'(PADDLE_SIZE_Y)) &&
                ({1'b0, pixel_row}       <= {1'b0, y_pos} + 11'(PADDLE_SIZE_Y));
  end

  assign red   = paddle_on;
  assign green = paddle_on;
  assign blue  = paddle_on;

endmodule
