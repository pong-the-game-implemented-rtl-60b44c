// pongmain: the Pong game core.
//
// Holds the ball, the player's paddle and the computer's paddle, runs the
// game's start / play / winner sequence and merges the three objects and the
// result into one RGB pixel stream for the VGA generator.
//
// How it works: the objects move once per video frame. A frame tick is the
// rising edge of vert_sync (the end of the vertical sync pulse), detected in
// the clk domain. A three-state machine controls the game:
//   WAIT_START - after reset; the ball stands still. start_n low starts play.
//   PLAY       - ball_en is high. A left-wall hit (the computer missed) means
//                the player wins; otherwise a right-wall hit (the player
//                missed) means the computer wins. Either ends play.
//   WINNER     - ball_en is low; the state holds until reset_n.
// Red, green and blue are the OR of the three objects' colours; player1win is
// ORed into green and player2win into red, so the whole visible screen turns
// green when the player wins and red when the computer wins.
//
// Interface: reset_n active low (asynchronous), start_n active low. move_up /
// move_down are the player's key levels. pixel_row / pixel_column come from
// the VGA generator and the colour outputs are combinational in them.
// ball_en follows the state register (high in every clock of PLAY), so a
// wall hit stops the ball before the next frame. The ball's paddle-plane
// flags are left unused here, as in the original game; only the wall hits
// end a game.
//
// The states, their order and the colour merging follow the original game;
// the vert_sync edge detector that turns the sync pulse into an enable is this
// design's own choice.
module pongmain
  import pong_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  logic   start_n,
  input  logic   vert_sync,
  input  logic   move_up,
  input  logic   move_down,
  input  coord_t pixel_row,
  input  coord_t pixel_column,
  output logic   red,
  output logic   green,
  output logic   blue
);

  typedef enum logic [1:0] {WAIT_START, PLAY, WINNER} state_t;

  state_t state;
  logic   player1win, player2win;
  logic   ball_en;
  logic   vert_sync_q, frame_tick;
  logic   backstop1, backstop2;
  logic   paddle1_plane, paddle2_plane;
  coord_t paddle_y_pos, paddle2_y_pos, ball_y_pos;
  logic   red_ball, grn_ball, blu_ball;
  logic   red_pad, grn_pad, blu_pad;
  logic   red_pad2, grn_pad2, blu_pad2;

  // Frame tick: end of the vertical sync pulse
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) vert_sync_q <= 1'b1;
    else          vert_sync_q <= vert_sync;
  end
  assign frame_tick = vert_sync & ~vert_sync_q;

  // Game state machine
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state      <= WAIT_START;
      player1win <= 1'b0;
      player2win <= 1'b0;
    end else begin
      unique case (state)
        WAIT_START: if (!start_n) state <= PLAY;
        PLAY: begin
          if (backstop2) begin
            state      <= WINNER;
            player1win <= 1'b1;
          end else if (backstop1) begin
            state      <= WINNER;
            player2win <= 1'b1;
          end
        end
        WINNER: state <= WINNER;
        default: state <= WAIT_START;
      endcase
    end
  end

  assign ball_en = (state == PLAY);

  // At most one winner, and only once play has ended
  a_one_winner: assert property (@(posedge clk) disable iff (!reset_n)
                                 !(player1win && player2win));
  a_win_ends_play: assert property (@(posedge clk) disable iff (!reset_n)
                                    (player1win || player2win) |-> state == WINNER);

  ball u_ball (
    .clk           (clk),
    .reset_n       (reset_n),
    .frame_tick    (frame_tick),
    .ball_en       (ball_en),
    .pixel_row     (pixel_row),
    .pixel_column  (pixel_column),
    .paddle_y_pos  (paddle_y_pos),
    .paddle2_y_pos (paddle2_y_pos),
    .red           (red_ball),
    .green         (grn_ball),
    .blue          (blu_ball),
    .paddle1_plane (paddle1_plane),
    .paddle2_plane (paddle2_plane),
    .backstop1     (backstop1),
    .backstop2     (backstop2),
    .ball_y_pos_ext(ball_y_pos)
  );

  paddle u_paddle (
    .clk             (clk),
    .reset_n         (reset_n),
    .frame_tick      (frame_tick),
    .move_up         (move_up),
    .move_down       (move_down),
    .pixel_row       (pixel_row),
    .pixel_column    (pixel_column),
    .red             (red_pad),
    .green           (grn_pad),
    .blue            (blu_pad),
    .paddle_y_pos_out(paddle_y_pos)
  );

  paddle2 u_paddle2 (
    .clk             (clk),
    .reset_n         (reset_n),
    .frame_tick      (frame_tick),
    .ball_y_pos      (ball_y_pos),
    .pixel_row       (pixel_row),
    .pixel_column    (pixel_column),
    .red             (red_pad2),
    .green           (grn_pad2),
    .blue            (blu_pad2),
    .paddle_y_pos_out(paddle2_y_pos)
  );

  assign red   = red_ball | red_pad | red_pad2 | player2win;
  assign green = grn_ball | grn_pad | grn_pad2 | player1win;
  assign blue  = blu_ball | blu_pad | blu_pad2;

endmodule
