// tb_ball: self-checking testbench for the ball.
//
// A reference model of the ball written in integers runs next to the block:
// every frame it decides the bounce off the top / bottom (rows 476 and 7
// reached within one step), the right-hand paddle zone (x + 11 >= 600) and
// wall (x + 3 >= 636), the left-hand zone (x + 3 <= 48) and wall (x <= 7),
// and moves 3 pixels per axis. After every frame the block's position, its
// exported row and its four flags are compared with the model. Scenarios:
//   1. ball_en low: no motion.
//   2. Both paddles follow the ball: it bounces for 600 frames, never
//      reaching a wall; bounces off every side are counted and required.
//   3. The right paddle is held away: paddle1_plane, then backstop1.
//   4. The right paddle follows, the left is held away: paddle2_plane, then
//      backstop2.
// Hand-worked values are checked too: from the start position the ball first
// turns down at row 6 after 78 frames, and first enters the right paddle
// zone at column 590 after 90 frames. Drawing is checked around the ball.
module tb_ball;

  logic       clk = 1'b0;
  logic       reset_n, frame_tick, ball_en;
  logic [9:0] pixel_row, pixel_column, paddle_y_pos, paddle2_y_pos, ball_y_pos_ext;
  logic       red, green, blue;
  logic       paddle1_plane, paddle2_plane, backstop1, backstop2;
  int         checks = 0, failures = 0;

  // reference model state
  int  mx, my, mdx, mdy;
  bit  m_pl1, m_pl2, m_bs1, m_bs2;
  int  n_top, n_bottom, n_right, n_left;

  always #5 clk = ~clk;

  ball dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic void model_reset();
    mx = 320; my = 240; mdx = 3; mdy = -3;
    m_pl1 = 0; m_pl2 = 0; m_bs1 = 0; m_bs2 = 0;
  endfunction

  function automatic void model_step(input int p1, input int p2);
    if (my + 3 >= 476)  begin if (mdy > 0) n_bottom++; mdy = -3; end
    else if (my <= 7)   begin if (mdy < 0) n_top++;    mdy = 3;  end
    if (mx + 3 >= 636) m_bs1 = 1;
    else if (mx + 11 >= 600) begin
      if (iabs(p1 - my) < 32) begin if (mdx > 0) n_right++; mdx = -3; end
      else m_pl1 = 1;
    end else if (mx <= 7) m_bs2 = 1;
    else if (mx + 3 <= 48) begin
      if (iabs(p2 - my) < 32) begin if (mdx < 0) n_left++; mdx = 3; end
      else m_pl2 = 1;
    end
    mx += mdx;
    my += mdy;
  endfunction

  task automatic tick();
    @(negedge clk);
    frame_tick = 1'b1;
    @(negedge clk);
    frame_tick = 1'b0;
    @(negedge clk);
  endtask

  task automatic compare(input string where);
    check(int'(dut.x_pos) == mx && int'(ball_y_pos_ext) == my,
          $sformatf("%s: ball (%0d,%0d), expected (%0d,%0d)", where,
                    dut.x_pos, ball_y_pos_ext, mx, my));
    check({paddle1_plane, paddle2_plane, backstop1, backstop2} == {m_pl1, m_pl2, m_bs1, m_bs2},
          $sformatf("%s: flags %b, expected %b", where,
                    {paddle1_plane, paddle2_plane, backstop1, backstop2},
                    {m_pl1, m_pl2, m_bs1, m_bs2}));
  endtask

  task automatic do_reset();
    reset_n = 1'b0;
    repeat (2) @(negedge clk);
    reset_n = 1'b1;
    model_reset();
    compare("after reset");
  endtask

  function automatic int clamp(input int v);
    return v < 32 ? 32 : (v > 450 ? 450 : v);
  endfunction

  // run frames; mode bit 0: right paddle follows, bit 1: left paddle follows
  task automatic run(input int n, input bit follow_right, input bit follow_left,
                     input bit stop_on_wall);
    for (int i = 0; i < n; i++) begin
      paddle_y_pos  = 10'(follow_right ? clamp(my) : clamp(my + 200 > 450 ? my - 200 : my + 200));
      paddle2_y_pos = 10'(follow_left  ? clamp(my) : clamp(my + 200 > 450 ? my - 200 : my + 200));
      #1;
      model_step(int'(paddle_y_pos), int'(paddle2_y_pos));
      tick();
      compare($sformatf("frame %0d", i));
      if (stop_on_wall && (m_bs1 || m_bs2)) break;
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_tick = 1'b0; ball_en = 1'b0;
    pixel_row = '0; pixel_column = '0;
    paddle_y_pos = 10'd210; paddle2_y_pos = 10'd200;
    n_top = 0; n_bottom = 0; n_right = 0; n_left = 0;
    do_reset();

    // 1. disabled
    repeat (5) tick();
    compare("ball_en low");

    // Hand-worked trajectory from the start
    ball_en = 1'b1;
    run(78, 1'b1, 1'b1, 1'b0);
    check(ball_y_pos_ext == 10'd6 && dut.x_pos == 10'd554, "frame 78 at (554,6)");
    run(1, 1'b1, 1'b1, 1'b0);
    check(ball_y_pos_ext == 10'd9, "turned down at row 6");
    run(11, 1'b1, 1'b1, 1'b0);
    check(dut.x_pos == 10'd590, "frame 90 at column 590");

    // 2. endless rally
    run(600, 1'b1, 1'b1, 1'b1);
    check(n_top >= 2 && n_bottom >= 2 && n_right >= 2 && n_left >= 2,
          $sformatf("rally bounces top %0d bottom %0d right %0d left %0d",
                    n_top, n_bottom, n_right, n_left));
    check(!(backstop1 || backstop2), "no wall hit during rally");

    // Drawing around the ball
    for (int dc = -6; dc <= 6; dc++)
      for (int dr = -6; dr <= 6; dr++) begin
        pixel_column = 10'(int'(dut.x_pos) + dc);
        pixel_row    = 10'(int'(ball_y_pos_ext) + dr);
        #1;
        check(red == (iabs(dc) <= 4 && iabs(dr) <= 4) && red == green && red == blue,
              $sformatf("ball pixel (%0d,%0d)", dc, dr));
      end

    // 3. player misses
    do_reset();
    run(400, 1'b0, 1'b1, 1'b1);
    check(paddle1_plane && backstop1 && !backstop2, "right miss: plane and backstop1");
    ball_en = 1'b0;
    repeat (3) tick();
    compare("held after disable");

    // 4. computer misses
    ball_en = 1'b1;
    do_reset();
    run(400, 1'b1, 1'b0, 1'b1);
    check(paddle2_plane && backstop2 && !backstop1, "left miss: plane and backstop2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
