// tb_pong_full: end-to-end testbench of the whole game at its full size.
//
// Runs the top level with all parameters at their defaults: the real
// 640 x 480 VGA timing and a PS/2 keyboard model at 12.5 kHz.
// It watches the VGA outputs where it can:
//   * Every frame it counts lit pixel clocks on the colour outputs. Before
//     play, white must cover exactly the parts of the ball (9 x 9) and the
//     paddles (9 x 65 each) inside the visible window (OBJ_PIX), and nothing
//     else may be lit.
//   * Game 1: start_n is pressed and no key is touched. The ball first reaches
//     the player's side far above the paddle, so the computer must win after
//     106 ball moves; the next frame must show white objects on an all-red
//     background (the stopped ball at column 638 is partly off screen, so
//     white covers OBJ_PIX_END pixel clocks and red all the others).
//   * Game 2: after reset_n and start_n the testbench plays: each frame it
//     picks the row where the ball will meet the player's paddle and holds
//     the up or down arrow, sending the real make (E0 75 / E0 72) and break
//     (E0 F0 75 / E0 F0 72) byte sequences over the PS/2 lines. The player
//     must win and the background must turn green.
// The mechanisms are counted and each must have happened at least once:
// arrow make and break decoded, paddle moved up and down, ball bounces off
// each paddle and off the top and bottom, a miss past a paddle plane, each
// winner. The frame period and the horizontal sync low time per frame are
// checked on the outputs.
module tb_pong_full;

  localparam int H_VIS = 640, H_SS = 659, H_SE = 755, H_TOT = 800, V_STEP = 699;
  localparam int V_VIS = 480, V_SS = 493, V_SE = 494, V_TOT = 525;
  localparam int HALF_BIT    = 1000;  // PS/2 clock phase in system clocks (12.5 kHz)
  localparam int OBJ_PIX     = 81 + 2 * 585;  // ball and both paddles
  localparam int OBJ_PIX_END = OBJ_PIX - 27;  // stopped ball at column 638
  localparam int FRAME_CLK = (V_TOT - 1) * H_TOT;  // the line counter wraps one line early
  localparam int HS_LOW    = (V_TOT - 1) * (H_SE - H_SS + 1);
  localparam int VIS_PIX   = H_VIS * V_VIS;

  logic clock = 1'b0;
  logic reset_n, start_n, kb_clk, kb_data;
  logic red, green, blue, horiz_sync, vert_sync;
  int   checks = 0, failures = 0;

  always #20 clock = ~clock;  // 25 MHz

  pong dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- frame statistics from the VGA outputs ----------------
  int frame_no = 0;
  int white_cnt, red_cnt, green_cnt, other_cnt, hs_low;
  int last_white, last_red, last_green, last_other, last_len, last_hs_low;
  int clk_in_frame = 0;
  logic vs_q = 1'b1;

  always @(posedge clock) begin
    vs_q <= vert_sync;
    clk_in_frame <= clk_in_frame + 1;
    if (!horiz_sync) hs_low <= hs_low + 1;
    if (dut.u_pongmain.frame_tick && dut.u_pongmain.ball_en) n_moves <= n_moves + 1;
    unique case ({red, green, blue})
      3'b111:  white_cnt <= white_cnt + 1;
      3'b100:  red_cnt   <= red_cnt + 1;
      3'b010:  green_cnt <= green_cnt + 1;
      3'b000:  ;
      default: other_cnt <= other_cnt + 1;
    endcase
    if (vs_q && !vert_sync) begin  // start of vertical sync: one frame done
      last_white  = white_cnt;  last_red   = red_cnt;
      last_green  = green_cnt;  last_other = other_cnt;
      last_len    = clk_in_frame; last_hs_low = hs_low;
      white_cnt <= 0; red_cnt <= 0; green_cnt <= 0; other_cnt <= 0;
      hs_low <= int'(!horiz_sync); clk_in_frame <= 1;
      frame_no <= frame_no + 1;
    end
  end

  task automatic wait_frames(input int n);
    int target = frame_no + n;
    wait (frame_no >= target);
    #1;
  endtask

  // ---------------- PS/2 keyboard model ----------------
  task automatic send_byte(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kb_data = f[i];
      #(HALF_BIT / 2 * 40);
      kb_clk = 1'b0;
      #(HALF_BIT * 40);
      kb_clk = 1'b1;
      #(HALF_BIT / 2 * 40);
    end
    kb_data = 1'b1;
    #(HALF_BIT * 40);
  endtask

  task automatic key(input logic [7:0] code, input bit make);
    send_byte(8'hE0);
    if (!make) send_byte(8'hF0);
    send_byte(code);
  endtask

  // ---------------- mechanism counters ----------------
  int n_up_make, n_up_break, n_down_make, n_down_break;
  int n_pad_up, n_pad_down, n_right_bounce, n_left_bounce, n_top, n_bottom;
  int n_miss, n_player_win, n_computer_win;
  int n_moves = 0;
  logic xneg_q, yneg_q, plane_q;
  logic [9:0] pad_q;

  // Key levels: count every edge
  always @(posedge dut.move_up)   if (reset_n) n_up_make++;
  always @(negedge dut.move_up)   if (reset_n) n_up_break++;
  always @(posedge dut.move_down) if (reset_n) n_down_make++;
  always @(negedge dut.move_down) if (reset_n) n_down_break++;

  // Game objects change once per frame: compare samples one frame apart,
  // taken at the end of each vertical sync pulse
  // (the first sample after a reset only records the new state)
  bit after_reset = 1'b1;
  always @(negedge reset_n) after_reset = 1'b1;
  always @(posedge vert_sync) begin
    xneg_q  <= dut.u_pongmain.u_ball.x_neg;
    yneg_q  <= dut.u_pongmain.u_ball.y_neg;
    plane_q <= dut.u_pongmain.paddle1_plane | dut.u_pongmain.paddle2_plane;
    pad_q   <= dut.u_pongmain.paddle_y_pos;
    if (reset_n && !after_reset) begin
      if (dut.u_pongmain.paddle_y_pos < pad_q) n_pad_up++;
      if (dut.u_pongmain.paddle_y_pos > pad_q) n_pad_down++;
      if (!xneg_q && dut.u_pongmain.u_ball.x_neg) n_right_bounce++;
      if (xneg_q && !dut.u_pongmain.u_ball.x_neg) n_left_bounce++;
      if (yneg_q && !dut.u_pongmain.u_ball.y_neg) n_top++;
      if (!yneg_q && dut.u_pongmain.u_ball.y_neg) n_bottom++;
      if (!plane_q && (dut.u_pongmain.paddle1_plane | dut.u_pongmain.paddle2_plane)) n_miss++;
    end
    if (reset_n) after_reset = 1'b0;
  end

  // Row at which a right-moving ball reaches the player's paddle zone
  function automatic int predict_row(input int x, input int y, input bit up);
    int dy = up ? -3 : 3;
    while (x + 11 < 600) begin
      if (y + 3 >= 476) dy = -3;
      else if (y <= 7)  dy = 3;
      x += 3;
      y += dy;
    end
    return y;
  endfunction

  task automatic press_start();
    @(posedge clock);
    start_n = 1'b0;
    repeat (3) @(posedge clock);
    start_n = 1'b1;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (2000) #(FRAME_CLK * 40);  // 2000 frames
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    int start_frame;
    int held;  // 0 none, 1 up, 2 down
    n_up_make = 0; n_up_break = 0; n_down_make = 0; n_down_break = 0;
    n_pad_up = 0; n_pad_down = 0; n_right_bounce = 0; n_left_bounce = 0;
    n_top = 0; n_bottom = 0; n_miss = 0; n_player_win = 0; n_computer_win = 0;
    white_cnt = 0; red_cnt = 0; green_cnt = 0; other_cnt = 0; hs_low = 0;
    kb_clk = 1'b1; kb_data = 1'b1; start_n = 1'b1;
    reset_n = 1'b0;
    repeat (10) @(posedge clock);
    reset_n = 1'b1;

    // Let the video timing settle, then check a waiting frame
    wait_frames(3);
    check(last_len == FRAME_CLK, $sformatf("frame length %0d clocks", last_len));
    check(last_hs_low == HS_LOW, $sformatf("hsync low %0d clocks per frame", last_hs_low));
    check(last_white == OBJ_PIX && last_red == 0 && last_green == 0 && last_other == 0,
          $sformatf("waiting frame: white %0d (expected %0d), red %0d, green %0d, other %0d",
                    last_white, OBJ_PIX, last_red, last_green, last_other));

    // ---- Game 1: nobody plays the right paddle ----
    press_start();
    n_moves = 0;
    wait (dut.u_pongmain.player2win || dut.u_pongmain.player1win);
    check(dut.u_pongmain.player2win, "game 1: computer wins");
    if (dut.u_pongmain.player2win) n_computer_win++;
    check(n_moves == 106, $sformatf("game 1 lasted %0d ball moves, expected 106", n_moves));
    wait_frames(2);
    // the stopped ball sits at column 638, three of its columns off screen
    check(last_red == VIS_PIX - last_white && last_white == OBJ_PIX_END &&
          last_green == 0 && last_other == 0,
          $sformatf("red screen: red %0d white %0d green %0d", last_red, last_white, last_green));

    // ---- Game 2: the testbench plays through the keyboard ----
    reset_n = 1'b0;
    repeat (3) @(posedge clock);
    reset_n = 1'b1;
    wait_frames(1);
    press_start();
    start_frame = frame_no;
    held = 0;
    while (!dut.u_pongmain.player2win && !dut.u_pongmain.player1win) begin
      int target, want;
      target = dut.u_pongmain.u_ball.x_neg ? 240 :
               predict_row(int'(dut.u_pongmain.u_ball.x_pos), int'(dut.u_pongmain.u_ball.y_pos),
                           dut.u_pongmain.u_ball.y_neg);
      want = target < int'(dut.u_pongmain.paddle_y_pos) - 1 ? 1 :
             target > int'(dut.u_pongmain.paddle_y_pos) + 1 ? 2 : 0;
      if (want != held) begin
        if (held == 1) key(8'h75, 1'b0);
        if (held == 2) key(8'h72, 1'b0);
        if (want == 1) key(8'h75, 1'b1);
        if (want == 2) key(8'h72, 1'b1);
        held = want;
      end else begin
        #(FRAME_CLK / 20 * 40);
      end
    end
    if (held == 1) key(8'h75, 1'b0);
    if (held == 2) key(8'h72, 1'b0);
    check(dut.u_pongmain.player1win, $sformatf("game 2: player wins (after %0d frames)",
                                               frame_no - start_frame));
    if (dut.u_pongmain.player1win) n_player_win++;
    wait_frames(2);
    check(last_green == VIS_PIX - last_white && last_red == 0,
          $sformatf("green screen: green %0d white %0d red %0d", last_green, last_white, last_red));

    $display("mechanisms: up make %0d break %0d, down make %0d break %0d, paddle up %0d down %0d",
             n_up_make, n_up_break, n_down_make, n_down_break, n_pad_up, n_pad_down);
    $display("mechanisms: bounce right %0d left %0d top %0d bottom %0d, plane miss %0d, wins player %0d computer %0d",
             n_right_bounce, n_left_bounce, n_top, n_bottom, n_miss, n_player_win, n_computer_win);
    check(n_up_make > 0 && n_up_break > 0, "up arrow make and break decoded");
    check(n_down_make > 0 && n_down_break > 0, "down arrow make and break decoded");
    check(n_pad_up > 0 && n_pad_down > 0, "player paddle moved both ways");
    check(n_right_bounce > 0 && n_left_bounce > 0, "bounces off both paddles");
    check(n_top > 0 && n_bottom > 0, "bounces off top and bottom");
    check(n_miss > 0, "a ball passed a paddle plane");
    check(n_player_win > 0 && n_computer_win > 0, "both winners seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
