// pong_pkg: constants shared by the Pong game core.
//
// The playing field is the visible 640 x 480 area of a VGA frame. All
// positions are 10-bit unsigned pixel coordinates of an object's centre;
// sizes are half-widths (an object is drawn where |pixel - centre| <= size).
// Motion is in pixels per frame: every object moves once per vertical sync.
// The numbers below are the ones of the original game; the 10-bit
// coordinate width follows its pixel_row / pixel_column buses.
package pong_pkg;

  localparam int unsigned COORD_W = 10;
  typedef logic [COORD_W-1:0] coord_t;

  // Visible screen
  localparam int unsigned SCREEN_W = 640;
  localparam int unsigned SCREEN_H = 480;

  // Ball: half size, speed in both axes, start position
  localparam int unsigned BALL_SIZE    = 4;
  localparam int unsigned BALL_SPEED_X = 3;
  localparam int unsigned BALL_SPEED_Y = 3;
  localparam int unsigned BALL_START_X = 320;
  localparam int unsigned BALL_START_Y = 240;

  // Paddles: half width, half height, speed, column and start row
  localparam int unsigned PADDLE_SIZE_X = 4;
  localparam int unsigned PADDLE_SIZE_Y = 32;
  localparam int unsigned PADDLE_SPEED  = 2;
  localparam int unsigned PLAYER_X      = 600;  // keyboard-controlled paddle, right side
  localparam int unsigned PLAYER_START_Y = 210;
  localparam int unsigned COMPUTER_X    = 40;   // ball-tracking paddle, left side
  localparam int unsigned COMPUTER_START_Y = 200;

  // Distance of each paddle plane from its side wall
  localparam int unsigned PLANE_DIST = 40;
  // Extra reach of the paddle-zone test (ball half size plus paddle half width)
  localparam int unsigned PLANE_MARGIN = 8;

  // PS/2 scan codes of the extended (E0-prefixed) arrow keys
  localparam logic [7:0] SC_EXTEND  = 8'hE0;
  localparam logic [7:0] SC_BREAK   = 8'hF0;
  localparam logic [7:0] SC_UP      = 8'h75;
  localparam logic [7:0] SC_DOWN    = 8'h72;
  localparam logic [7:0] SC_LEFT    = 8'h6B;
  localparam logic [7:0] SC_RIGHT   = 8'h74;

endpackage
