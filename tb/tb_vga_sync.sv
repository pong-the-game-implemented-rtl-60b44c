// tb_vga_sync: self-checking testbench for the VGA timing generator.
//
// Runs the generator at its full 640 x 480 timing and feeds back a colour
// pattern computed from its pixel coordinates (red = column bit 0, green =
// row bit 0, blue = 1). After letting the counters settle for a frame it
// measures, from the outputs alone: the horizontal period (800 clocks) and
// sync width (97 clocks), the vertical period and sync width (2 lines), the number of visible clocks per line (640) and of visible lines
// per frame (480), the gap from the end of the visible line to the falling
// edge of horizontal sync (19 clocks), and the colour pattern on the first
// lines of a frame. The line counter wraps as soon as it reaches line 524
// past column 699, so line 524 lasts a single clock and a frame is 524 lines
// (419,200 clocks) long.
module tb_vga_sync;

  logic       clk = 1'b0;
  logic       red, green, blue;
  logic       red_out, green_out, blue_out, horiz_sync_out, vert_sync_out;
  logic [9:0] pixel_row, pixel_column;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_sync dut (
    .clock_25mhz(clk), .red, .green, .blue, .red_out, .green_out, .blue_out,
    .horiz_sync_out, .vert_sync_out, .pixel_row, .pixel_column
  );

  assign red   = pixel_column[0];
  assign green = pixel_row[0];
  assign blue  = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #30_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, low, vis, lines, vis_lines, gap;
    // Settle: more than one frame
    repeat (800 * 530) @(posedge clk) #1;
    // Wait for the start of a vertical sync pulse
    @(negedge vert_sync_out);
    // Vertical sync width in lines (counted as horizontal sync pulses)
    low = 0;
    while (!vert_sync_out) begin
      @(posedge clk) #1;
      low++;
    end
    check(low == 2 * 800, $sformatf("vertical sync width %0d clocks, expected 1600", low));

    // One frame starting at the end of the vsync pulse
    lines = 0; vis_lines = 0;
    n = 0;
    while (vert_sync_out) begin
      logic hs_prev;
      hs_prev = horiz_sync_out;
      @(posedge clk) #1;
      #1;
      n++;
      if (hs_prev && !horiz_sync_out) lines++;
    end
    check(n + low == 524 * 800, $sformatf("frame length %0d clocks, expected 419200", n + low));
    check(lines == 522, $sformatf("%0d hsync pulses outside vsync, expected 522", lines));

    // Now measure lines: find the first visible line of the next frame
    @(posedge blue_out);
    for (int l = 0; l < 480 + 4; l++) begin
      vis = 0;
      // count visible clocks on this line, check colour pattern
      while (blue_out) begin
        if (l < 3) begin
          check(red_out == vis[0], $sformatf("red pattern at column %0d line %0d", vis, l));
          check(green_out == l[0], $sformatf("green pattern at line %0d", l));
        end
        vis++;
        @(posedge clk) #1;
      end
      if (vis > 0) begin
        vis_lines++;
        check(vis == 640, $sformatf("line %0d has %0d visible clocks", l, vis));
      end
      // gap to hsync falling edge
      gap = 0;
      while (horiz_sync_out) begin
        @(posedge clk) #1;
        gap++;
      end
      if (l < 3) check(gap == 19, $sformatf("front porch %0d, expected 19", gap));
      low = 0;
      while (!horiz_sync_out) begin
        @(posedge clk) #1;
        low++;
      end
      if (l < 3) check(low == 97, $sformatf("hsync width %0d, expected 97", low));
      // skip to the start of the next line: 800 - 640 - 19 - 97 = 44 clocks
      repeat (44) @(posedge clk) #1;
    end
    check(vis_lines == 480, $sformatf("%0d visible lines, expected 480", vis_lines));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
