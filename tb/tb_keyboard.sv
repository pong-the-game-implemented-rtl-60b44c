// tb_keyboard: self-checking testbench for the PS/2 receiver.
//
// A keyboard model sends 11-bit PS/2 frames (start, 8 data bits LSB first,
// odd parity, stop) with the data line changing in the middle of each high
// clock phase. For every byte the test checks that scan_ready rises within a
// bounded number of system clocks after the stop bit, that scan_code is the
// byte sent, that scan_ready stays high until read and drops the clock after
// a one-clock read pulse. A few short glitches on the keyboard clock, shorter
// than the filter, must not start a frame.
module tb_keyboard;

  localparam int HALF_BIT = 40;  // system clocks per keyboard-clock phase
  localparam int MAX_LAT  = 16;  // clocks from stop-bit rising edge to scan_ready

  logic       clk = 1'b0;
  logic       reset;
  logic       kb_clk, kb_data, read;
  logic [7:0] scan_code;
  logic       scan_ready;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  keyboard dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send one byte; returns after the stop bit's rising edge
  task automatic send_byte(input logic [7:0] b);
    logic [10:0] frame;
    frame = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kb_data = frame[i];
      repeat (HALF_BIT / 2) @(posedge clk);
      kb_clk = 1'b0;
      repeat (HALF_BIT) @(posedge clk);
      kb_clk = 1'b1;
      repeat (HALF_BIT / 2) @(posedge clk);
    end
    kb_data = 1'b1;
  endtask

  task automatic receive_and_check(input logic [7:0] b);
    int lat;
    fork
      send_byte(b);
    join
    // the stop bit's rising edge was HALF_BIT/2 clocks ago
    lat = HALF_BIT / 2;
    while (!scan_ready && lat < HALF_BIT / 2 + MAX_LAT + 8) begin
      @(posedge clk);
      lat++;
    end
    check(scan_ready, $sformatf("scan_ready after byte %02h", b));
    check(lat <= HALF_BIT / 2 + MAX_LAT, $sformatf("latency %0d for byte %02h", lat, b));
    check(scan_code == b, $sformatf("scan_code %02h, expected %02h", scan_code, b));
    repeat (5) @(posedge clk);
    check(scan_ready, "scan_ready held until read");
    read = 1'b1;
    @(posedge clk);
    read = 1'b0;
    #1;
    check(!scan_ready, "scan_ready cleared by read");
    check(scan_code == b, "scan_code held after read");
    repeat (3 * HALF_BIT) @(posedge clk);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kb_clk  = 1'b1;
    kb_data = 1'b1;
    read    = 1'b0;
    reset   = 1'b1;
    repeat (4) @(posedge clk);
    reset = 1'b0;
    repeat (20) @(posedge clk);

    // Glitches shorter than the filter must be ignored
    for (int g = 0; g < 3; g++) begin
      kb_data = 1'b0;
      kb_clk  = 1'b0;
      repeat (5) @(posedge clk);
      kb_clk = 1'b1;
      repeat (5) @(posedge clk);
    end
    kb_data = 1'b1;
    repeat (40) @(posedge clk);
    check(!scan_ready, "no frame from clock glitches");

    foreach (sc_list[i]) receive_and_check(sc_list[i]);
    for (int i = 0; i < 12; i++) receive_and_check(8'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] sc_list [6] = '{8'hE0, 8'hF0, 8'h75, 8'h00, 8'hFF, 8'hA5};

endmodule
