// tb_paddle: self-checking testbench for the player's paddle.
//
// Checks the start row (210), that the paddle moves exactly 2 rows per frame
// tick and not at all between ticks, that up wins over down, that it stops
// at the top (row 32) and the bottom (row 450) limits, and that it is drawn
// exactly over the 9 x 65 pixel rectangle centred on (600, y).
module tb_paddle;

  logic       clk = 1'b0;
  logic       reset_n, frame_tick, move_up, move_down;
  logic [9:0] pixel_row, pixel_column, paddle_y_pos_out;
  logic       red, green, blue;
  int         checks = 0, failures = 0;
  int         exp_y;

  always #5 clk = ~clk;

  paddle dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic frames(input int n, input bit up, input bit down);
    move_up   = up;
    move_down = down;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      frame_tick = 1'b1;
      @(negedge clk);
      frame_tick = 1'b0;
      if (up && exp_y > 32)         exp_y -= 2;
      else if (down && exp_y <= 448) exp_y += 2;
      repeat (3) @(negedge clk);
      check(paddle_y_pos_out == 10'(exp_y),
            $sformatf("paddle row %0d, expected %0d", paddle_y_pos_out, exp_y));
    end
  endtask

  task automatic check_draw();
    // pixels around the paddle outline
    for (int dc = -6; dc <= 6; dc++) begin
      for (int dr = -34; dr <= 34; dr += 1) begin
        if (dr > -30 && dr < 30 && dr % 7 != 0) continue;
        pixel_column = 10'(600 + dc);
        pixel_row    = 10'(int'(paddle_y_pos_out) + dr);
        #1;
        check(red == (dc >= -4 && dc <= 4 && dr >= -32 && dr <= 32),
              $sformatf("pixel (%0d,%0d) relative to paddle", dc, dr));
        check(red == green && green == blue, "paddle drawn white");
      end
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_tick = 1'b0; move_up = 1'b0; move_down = 1'b0;
    pixel_row = '0; pixel_column = '0;
    reset_n = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    exp_y = 210;
    check(paddle_y_pos_out == 10'd210, "start row 210");

    // No tick, no motion
    move_up = 1'b1;
    repeat (20) @(negedge clk);
    check(paddle_y_pos_out == 10'd210, "no motion without frame tick");

    frames(5, 1'b0, 1'b0);
    frames(10, 1'b1, 1'b0);
    frames(10, 1'b1, 1'b1);  // up wins
    frames(100, 1'b1, 1'b0); // reach top
    check(paddle_y_pos_out == 10'd32, "stops at top row 32");
    check_draw();
    frames(250, 1'b0, 1'b1); // reach bottom
    check(paddle_y_pos_out == 10'd450, "stops at bottom row 450");
    check_draw();
    for (int i = 0; i < 50; i++) frames(int'($urandom_range(8, 1)), 1'($urandom), 1'($urandom));
    check_draw();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
