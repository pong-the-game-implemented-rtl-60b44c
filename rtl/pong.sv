// pong: single-player Pong for a VGA monitor and a PS/2 keyboard.
//
// The player steers the right-hand paddle with the up and down arrow keys
// against a computer-steered paddle on the left. The ball moves 3 pixels per
// frame in each axis and the paddles 2, so the computer can be beaten. A
// miss ends the game: the screen turns green if the player won and red if the
// computer did. start_n starts a game, reset_n prepares a new one.
//
// Structure: kb_main turns the keyboard's serial frames into four key levels
// (only up and down are used; left and right are left unconnected);
// pongmain holds the game; vga_sync generates the 640 x 480 timing, tells
// pongmain which pixel is being drawn and blanks and registers its colour.
// pongmain moves its objects on the rising edge of vga_sync's vert_sync
// output. The keyboard block's reset is active high, so it gets the inverse of
// reset_n.
//
// Interface: clock is the 25 MHz pixel clock. reset_n and start_n are active
// low push buttons. kb_clk / kb_data are the PS/2 lines. The five video
// outputs drive a VGA connector (one bit per colour, active-low syncs). The
// colour and sync outputs are two clocks behind the pixel counters.
//
// The VGA timing parameters only change the video frame; the game itself
// always plays on a 640 x 480 field and moves once per frame, so a smaller
// frame gives a faster (but not displayable) game for simulation.
//
// The block structure and the connections follow the original top level;
// exposing the VGA timing as parameters is this design's own choice.
module pong #(
  // VGA timing, passed to vga_sync (defaults: 640 x 480 at a 25 MHz pixel clock)
  parameter int unsigned H_VISIBLE    = 640,
  parameter int unsigned H_SYNC_START = 659,
  parameter int unsigned H_SYNC_END   = 755,
  parameter int unsigned H_TOTAL      = 800,
  parameter int unsigned V_STEP_COL   = 699,
  parameter int unsigned V_VISIBLE    = 480,
  parameter int unsigned V_SYNC_START = 493,
  parameter int unsigned V_SYNC_END   = 494,
  parameter int unsigned V_TOTAL      = 525
) (
  input  logic clock,
  input  logic reset_n,
  input  logic start_n,
  input  logic kb_clk,
  input  logic kb_data,
  output logic red,
  output logic green,
  output logic blue,
  output logic horiz_sync,
  output logic vert_sync
);

  logic       move_up, move_down, key_left, key_right;
  logic       red_core, grn_core, blu_core;
  logic [9:0] pixel_row, pixel_column;

  kb_main u_kb_main (
    .clk          (clock),
    .reset        (~reset_n),
    .keyboard_clk (kb_clk),
    .keyboard_data(kb_data),
    .up           (move_up),
    .down         (move_down),
    .left         (key_left),
    .right        (key_right)
  );

  pongmain u_pongmain (
    .clk         (clock),
    .reset_n     (reset_n),
    .start_n     (start_n),
    .vert_sync   (vert_sync),
    .move_up     (move_up),
    .move_down   (move_down),
    .pixel_row   (pixel_row),
    .pixel_column(pixel_column),
    .red         (red_core),
    .green       (grn_core),
    .blue        (blu_core)
  );

  vga_sync #(
    .H_VISIBLE   (H_VISIBLE),
    .H_SYNC_START(H_SYNC_START),
    .H_SYNC_END  (H_SYNC_END),
    .H_TOTAL     (H_TOTAL),
    .V_STEP_COL  (V_STEP_COL),
    .V_VISIBLE   (V_VISIBLE),
    .V_SYNC_START(V_SYNC_START),
    .V_SYNC_END  (V_SYNC_END),
    .V_TOTAL     (V_TOTAL)
  ) u_vga_sync (
    .clock_25mhz   (clock),
    .red           (red_core),
    .green         (grn_core),
    .blue          (blu_core),
    .red_out       (red),
    .green_out     (green),
    .blue_out      (blue),
    .horiz_sync_out(horiz_sync),
    .vert_sync_out (vert_sync),
    .pixel_row     (pixel_row),
    .pixel_column  (pixel_column)
  );

endmodule
