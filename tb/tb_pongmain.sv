// tb_pongmain: self-checking testbench for the game core.
//
// Drives short artificial frames (vert_sync low for 2 of every 12 clocks) and
// probes the colour outputs at chosen pixels. Game 1: before start_n the ball
// stays at the screen centre; after start_n it leaves; with the player's
// paddle left alone the ball passes it (its first pass reaches column 590 at
// row 42, far from the paddle at row 210) and the computer wins: the ball
// stops and every pixel away from the objects is red only. Game 2: after a
// reset the testbench plays the right paddle, moving it towards the row at
// which the ball will arrive (and back to the middle while the ball moves
// away); the game must end with the player winning (all-green background).
// The number of frames to each result is checked against the ball's path,
// and the test counts each mechanism: start wait, play, paddle bounce on
// each side, top and bottom bounce, a miss, each winner.
module tb_pongmain;

  logic       clk = 1'b0;
  logic       reset_n, start_n, vert_sync, move_up, move_down;
  logic [9:0] pixel_row, pixel_column;
  logic       red, green, blue;
  int         checks = 0, failures = 0;
  int         frame_no;
  int         n_right_bounce, n_left_bounce, n_top, n_bottom;

  always #5 clk = ~clk;

  pongmain dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One short frame: sync low for 2 clocks, high for 10
  task automatic frame();
    @(negedge clk);
    vert_sync = 1'b0;
    repeat (2) @(negedge clk);
    vert_sync = 1'b1;
    repeat (10) @(negedge clk);
    frame_no++;
  endtask

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

  task automatic probe(input int col, input int row, output logic [2:0] rgb);
    pixel_column = 10'(col);
    pixel_row    = 10'(row);
    #1;
    rgb = {red, green, blue};
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count bounces from the ball's direction bits
  logic xneg_q, yneg_q;
  always @(posedge clk) begin
    xneg_q <= dut.u_ball.x_neg;
    yneg_q <= dut.u_ball.y_neg;
    if (reset_n) begin
      if (!xneg_q && dut.u_ball.x_neg) n_right_bounce++;
      if (xneg_q && !dut.u_ball.x_neg) n_left_bounce++;
      if (yneg_q && !dut.u_ball.y_neg) n_top++;
      if (!yneg_q && dut.u_ball.y_neg) n_bottom++;
    end
  end

  initial begin
    logic [2:0] rgb;
    int start_frame, misses;
    n_right_bounce = 0; n_left_bounce = 0; n_top = 0; n_bottom = 0;
    frame_no = 0;
    start_n = 1'b1; vert_sync = 1'b1; move_up = 1'b0; move_down = 1'b0;
    pixel_row = '0; pixel_column = '0;
    reset_n = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;

    // ---- Game 1: waiting, then the computer wins ----
    repeat (20) frame();
    probe(320, 240, rgb);
    check(rgb == 3'b111, "ball waits at the centre before start");
    probe(600, 210, rgb);
    check(rgb == 3'b111, "player paddle at (600,210)");
    // the computer's paddle tracks the waiting ball: 200 -> 240 in 20 frames
    probe(40, 240, rgb);
    check(rgb == 3'b111, "computer paddle moved to (40,240)");
    check(dut.paddle2_y_pos == 10'd240, "computer paddle row 240");
    probe(100, 400, rgb);
    check(rgb == 3'b000, "background black");

    @(negedge clk) start_n = 1'b0;
    @(negedge clk) start_n = 1'b1;
    start_frame = frame_no;
    repeat (5) frame();
    probe(320, 240, rgb);
    check(rgb == 3'b000, "ball left the centre after start");
    while (dut.state != 2'd2 && frame_no - start_frame < 200) frame();
    check(frame_no - start_frame == 106,
          $sformatf("computer won after %0d frames, expected 106", frame_no - start_frame));
    check(dut.u_ball.paddle1_plane, "ball crossed the player's plane");
    repeat (3) frame();
    probe(100, 400, rgb);
    check(rgb == 3'b100, "computer win: red background");
    probe(600, 210, rgb);
    check(rgb == 3'b111, "paddle still drawn over the red");
    begin
      logic [9:0] hold;
      hold = dut.u_ball.x_pos;
      repeat (5) frame();
      check(dut.u_ball.x_pos == hold, "ball stopped after the game");
    end

    // ---- Game 2: the testbench plays the right paddle ----
    reset_n = 1'b0;
    @(negedge clk);
    reset_n = 1'b1;
    probe(100, 400, rgb);
    check(rgb == 3'b000, "reset clears the winner colour");
    @(negedge clk) start_n = 1'b0;
    @(negedge clk) start_n = 1'b1;
    start_frame = frame_no;
    while (dut.state != 2'd2 && frame_no - start_frame < 20000) begin
      int target;
      target    = dut.u_ball.x_neg ? 240 : predict_row(int'(dut.u_ball.x_pos), int'(dut.u_ball.y_pos),
                                                       dut.u_ball.y_neg);
      move_up   = target < int'(dut.paddle_y_pos);
      move_down = target > int'(dut.paddle_y_pos);
      frame();
    end
    move_up = 1'b0; move_down = 1'b0;
    repeat (3) frame();
    probe(100, 400, rgb);
    check(rgb == 3'b010, $sformatf("player win: green background after %0d frames",
                                    frame_no - start_frame));
    check(dut.player1win && !dut.player2win, "player1win set");

    $display("bounces: right %0d left %0d top %0d bottom %0d",
             n_right_bounce, n_left_bounce, n_top, n_bottom);
    check(n_right_bounce > 0, "player's paddle returned the ball");
    check(n_left_bounce > 0, "computer's paddle returned the ball");
    check(n_top > 0 && n_bottom > 0, "top and bottom bounces");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
