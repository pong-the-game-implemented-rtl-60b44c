// ball: the Pong ball, its motion and its collisions.
//
// Keeps the ball's centre (x, y) and its direction in each axis, moves it
// once per frame while the game is running, bounces it off the top and bottom
// of the screen and off the paddles, reports when it reaches a side wall, and
// draws it as a 9 x 9 white square.
//
// How it works: on each frame_tick with ball_en high, the next direction is
// decided from the current position, then the ball moves SPEED_X / SPEED_Y
// pixels in that direction.
//   * Vertical: if y + SPEED_Y >= SCREEN_H - BALL_SIZE the ball turns up,
//     else if y <= BALL_SIZE + SPEED_Y it turns down.
//   * Right side (player's paddle at x = 600), tested first:
//     if x + SPEED_X >= SCREEN_W - BALL_SIZE the right wall is hit (backstop1);
//     else if x + SPEED_X + 8 >= SCREEN_W - PLANE_DIST the ball is in the
//     paddle zone: it turns left when the paddle overlaps it, otherwise
//     paddle1_plane is raised.
//   * Left side (computer's paddle at x = 40), mirrored: x <= BALL_SIZE +
//     SPEED_X hits the left wall (backstop2); x + SPEED_X <= PLANE_DIST + 8 is
//     the paddle zone, with a turn right or paddle2_plane.
//   * The paddle "overlaps" when |paddle_y - y| < PADDLE_SIZE_Y.
// The four flags are sticky until reset. Because a bounce is allowed anywhere
// in the paddle zone, a paddle that catches up with a ball it missed can still
// return it from behind its own plane; this is the original game's behaviour.
//
// Interface: reset_n (active low) puts the ball at the screen centre moving
// up and right and clears the flags. frame_tick is a one-clock pulse per
// frame; while ball_en is low the ball holds still. ball_y_pos_ext is the
// registered centre row, used by the computer's paddle. red/green/blue are the
// combinational "ball is here" test for pixel (pixel_column, pixel_row).
//
// The collision tests, constants and start state follow the original ball.
// This design's own choices: the direction decided in a frame is applied in
// the same frame (no extra frame of lag), the ball row is exported without a
// frame of delay, and the block runs on clk with frame_tick as an enable.
module ball
  import pong_pkg::*;
#(
  parameter int unsigned SPEED_X = BALL_SPEED_X,
  parameter int unsigned SPEED_Y = BALL_SPEED_Y
) (
  input  logic   clk,
  input  logic   reset_n,
  input  logic   frame_tick,
  input  logic   ball_en,
  input  coord_t pixel_row,
  input  coord_t pixel_column,
  input  coord_t paddle_y_pos,   // player's paddle (right)
  input  coord_t paddle2_y_pos,  // computer's paddle (left)
  output logic   red,
  output logic   green,
  output logic   blue,
  output logic   paddle1_plane,
  output logic   paddle2_plane,
  output logic   backstop1,
  output logic   backstop2,
  output coord_t ball_y_pos_ext
);

  typedef logic [COORD_W:0] wide_t;  // one bit wider, for sums

  coord_t x_pos, y_pos;
  logic   x_neg, y_neg;              // direction: 1 = towards 0

  // Next-direction decision and side events, from the current position
  logic   x_neg_n, y_neg_n;
  logic   hit_right_wall, hit_left_wall;
  logic   miss_right, miss_left;

  function automatic logic overlaps(coord_t pad_y, coord_t ball_y);
    return (wide_t'(pad_y) < wide_t'(ball_y) + wide_t'(PADDLE_SIZE_Y)) &&
           (wide_t'(pad_y) + wide_t'(PADDLE_SIZE_Y) > wide_t'(ball_y));
  endfunction

  always_comb begin
    y_neg_n        = y_neg;
    x_neg_n        = x_neg;
    hit_right_wall = 1'b0;
    hit_left_wall  = 1'b0;
    miss_right     = 1'b0;
    miss_left      = 1'b0;

    if (wide_t'(y_pos) + wide_t'(SPEED_Y) >= wide_t'(SCREEN_H - BALL_SIZE))
      y_neg_n = 1'b1;
    else if (wide_t'(y_pos) <= wide_t'(BALL_SIZE + SPEED_Y))
      y_neg_n = 1'b0;

    if (wide_t'(x_pos) + wide_t'(SPEED_X) >= wide_t'(SCREEN_W - BALL_SIZE)) begin
      hit_right_wall = 1'b1;
    end else if (wide_t'(x_pos) + wide_t'(SPEED_X + PLANE_MARGIN) >=
                 wide_t'(SCREEN_W - PLANE_DIST)) begin
      if (overlaps(paddle_y_pos, y_pos)) x_neg_n = 1'b1;
      else                               miss_right = 1'b1;
    end else if (wide_t'(x_pos) <= wide_t'(BALL_SIZE + SPEED_X)) begin
      hit_left_wall = 1'b1;
    end else if (wide_t'(x_pos) + wide_t'(SPEED_X) <= wide_t'(PLANE_DIST + PLANE_MARGIN)) begin
      if (overlaps(paddle2_y_pos, y_pos)) x_neg_n = 1'b0;
      else                                miss_left = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      x_pos         <= coord_t'(BALL_START_X);
      y_pos         <= coord_t'(BALL_START_Y);
      x_neg         <= 1'b0;  // moving right
      y_neg         <= 1'b1;  // moving up
      paddle1_plane <= 1'b0;
      paddle2_plane <= 1'b0;
      backstop1     <= 1'b0;
      backstop2     <= 1'b0;
    end else if (frame_tick && ball_en) begin
      x_neg <= x_neg_n;
      y_neg <= y_neg_n;
      x_pos <= x_neg_n ? x_pos - coord_t'(SPEED_X) : x_pos + coord_t'(SPEED_X);
      y_pos <= y_neg_n ? y_pos - coord_t'(SPEED_Y) : y_pos + coord_t'(SPEED_Y);
      if (hit_right_wall) backstop1     <= 1'b1;
      if (hit_left_wall)  backstop2     <= 1'b1;
      if (miss_right)     paddle1_plane <= 1'b1;
      if (miss_left)      paddle2_plane <= 1'b1;
    end
  end

  assign ball_y_pos_ext = y_pos;

  // Drawing
  logic ball_on;
  always_comb begin
    ball_on = (wide_t'(x_pos)        <= wide_t'(pixel_column) + wide_t'(BALL_SIZE)) &&
              (wide_t'(pixel_column) <= wide_t'(x_pos) + wide_t'(BALL_SIZE)) &&
              (wide_t'(y_pos)        <= wide_t'(pixel_row) + wide_t'(BALL_SIZE)) &&
              (wide_t'(pixel_row)    <= wide_t'(y_pos) + wide_t'(BALL_SIZE));
  end

  assign red   = ball_on;
  assign green = ball_on;
  assign blue  = ball_on;

endmodule
