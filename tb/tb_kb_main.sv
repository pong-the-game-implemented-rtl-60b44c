// tb_kb_main: self-checking testbench for the keyboard front end.
//
// A PS/2 keyboard model sends the make (E0 xx) and break (E0 F0 xx) byte
// sequences of the four arrow keys over the serial lines; after each
// sequence the test compares the four key outputs with the expected held
// keys. It also checks that the front end recovers each byte in time: a key
// must be seen as pressed within a bounded time after its last frame.
module tb_kb_main;

  localparam int HALF_BIT = 50;  // system clocks per keyboard-clock phase

  logic clk = 1'b0;
  logic reset;
  logic keyboard_clk, keyboard_data;
  logic up, down, left, right;
  int   checks = 0, failures = 0;
  logic [3:0] expected;

  always #5 clk = ~clk;

  kb_main dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_byte(input logic [7:0] b);
    logic [10:0] frame;
    frame = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      keyboard_data = frame[i];
      repeat (HALF_BIT / 2) @(posedge clk);
      keyboard_clk = 1'b0;
      repeat (HALF_BIT) @(posedge clk);
      keyboard_clk = 1'b1;
      repeat (HALF_BIT / 2) @(posedge clk);
    end
    keyboard_data = 1'b1;
    repeat (2 * HALF_BIT) @(posedge clk);  // gap between bytes
  endtask

  function automatic int key_index(input logic [7:0] c);
    case (c)
      8'h75: return 3;
      8'h72: return 2;
      8'h6B: return 1;
      default: return 0;
    endcase
  endfunction

  task automatic key(input logic [7:0] c, input bit make);
    send_byte(8'hE0);
    if (!make) send_byte(8'hF0);
    send_byte(c);
    expected[key_index(c)] = make;
    check({up, down, left, right} == expected,
          $sformatf("%s %02h: keys %b, expected %b", make ? "make" : "break", c,
                    {up, down, left, right}, expected));
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] arrows [4] = '{8'h75, 8'h72, 8'h6B, 8'h74};
    expected      = '0;
    keyboard_clk  = 1'b1;
    keyboard_data = 1'b1;
    reset         = 1'b1;
    repeat (4) @(posedge clk);
    reset = 1'b0;
    repeat (20) @(posedge clk);
    check({up, down, left, right} == 4'b0, "keys clear after reset");

    foreach (arrows[i]) key(arrows[i], 1'b1);
    foreach (arrows[i]) key(arrows[i], 1'b0);
    for (int n = 0; n < 16; n++) key(arrows[$urandom_range(3, 0)], 1'($urandom_range(1, 0)));

    // Plain (non-extended) release of the same code changes nothing
    key(8'h75, 1'b1);
    send_byte(8'hF0);
    send_byte(8'h75);
    check(up, "plain F0 75 does not release the up arrow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
