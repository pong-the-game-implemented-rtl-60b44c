// tb_paddle2: self-checking testbench for the computer's paddle.
//
// Moves a ball row around and checks that the paddle (column 40, start row
// 200) steps 2 rows per frame towards it, stops when level with it, holds
// between frame ticks, respects the screen limits (32 and 450), and is drawn
// around column 40.
module tb_paddle2;

  logic       clk = 1'b0;
  logic       reset_n, frame_tick;
  logic [9:0] ball_y_pos, pixel_row, pixel_column, paddle_y_pos_out;
  logic       red, green, blue;
  int         checks = 0, failures = 0;
  int         exp_y;

  always #5 clk = ~clk;

  paddle2 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic frames(input int n, input int ball);
    ball_y_pos = 10'(ball);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      frame_tick = 1'b1;
      @(negedge clk);
      frame_tick = 1'b0;
      if (ball < exp_y && exp_y > 32)        exp_y -= 2;
      else if (ball > exp_y && exp_y <= 448) exp_y += 2;
      repeat (2) @(negedge clk);
      check(paddle_y_pos_out == 10'(exp_y),
            $sformatf("paddle row %0d, expected %0d (ball %0d)", paddle_y_pos_out, exp_y, ball));
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
    frame_tick = 1'b0; ball_y_pos = 10'd200;
    pixel_row = '0; pixel_column = '0;
    reset_n = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    exp_y = 200;
    check(paddle_y_pos_out == 10'd200, "start row 200");

    frames(5, 200);               // level: stays
    frames(60, 300);              // follows down, stops at 300
    check(paddle_y_pos_out == 10'd300, "reaches ball row 300");
    ball_y_pos = 10'd100;
    repeat (20) @(negedge clk);
    check(paddle_y_pos_out == 10'd300, "no motion without frame tick");
    frames(150, 5);               // top limit
    check(paddle_y_pos_out == 10'd32, "stops at top row 32");
    frames(250, 470);             // bottom limit
    check(paddle_y_pos_out == 10'd450, "stops at bottom row 450");
    for (int i = 0; i < 30; i++) frames(int'($urandom_range(20, 1)), int'($urandom_range(479, 0)));

    // Drawing around column 40
    pixel_row = paddle_y_pos_out;
    for (int c = 30; c <= 50; c++) begin
      pixel_column = 10'(c);
      #1;
      check(red == (c >= 36 && c <= 44), $sformatf("drawn at column %0d", c));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
