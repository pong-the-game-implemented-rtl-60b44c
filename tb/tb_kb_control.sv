// tb_kb_control: self-checking testbench for the arrow-key tracker.
//
// Plays the receiver's side of the handshake: it presents a scan code with
// scan_rdy high and drops scan_rdy the clock after read_en is seen, as the
// receiver does. It checks that every code is acknowledged by exactly one
// read_en clock, and after every code compares the four key outputs with an
// expected key state worked out from the code sequences: E0 xx presses an
// arrow, E0 F0 xx releases it, and un-prefixed or F0-only sequences change
// nothing.
module tb_kb_control;

  logic       clk = 1'b0;
  logic       reset;
  logic [7:0] scancode;
  logic       scan_rdy;
  logic       read_en, up, down, left, right;
  int         checks = 0, failures = 0;
  logic [3:0] expected;  // {up, down, left, right}

  always #5 clk = ~clk;

  kb_control dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic put_code(input logic [7:0] c);
    int reads = 0, waited = 0;
    @(negedge clk);
    scancode = c;
    scan_rdy = 1'b1;
    // receiver behaviour: ready stays high until read_en has been seen
    while (waited < 10) begin
      @(posedge clk);
      #1;
      if (read_en) reads++;
      waited++;
      if (reads > 0 && scan_rdy) begin
        @(negedge clk);
        scan_rdy = 1'b0;
      end
    end
    check(reads == 1, $sformatf("code %02h acknowledged %0d times", c, reads));
  endtask

  function automatic int key_index(input logic [7:0] c);
    case (c)
      8'h75: return 3;
      8'h72: return 2;
      8'h6B: return 1;
      8'h74: return 0;
      default: return -1;
    endcase
  endfunction

  task automatic press(input logic [7:0] c);
    put_code(8'hE0);
    put_code(c);
    if (key_index(c) >= 0) expected[key_index(c)] = 1'b1;
    check({up, down, left, right} == expected,
          $sformatf("after press %02h keys %b, expected %b", c, {up, down, left, right}, expected));
  endtask

  task automatic release_key(input logic [7:0] c);
    put_code(8'hE0);
    put_code(8'hF0);
    put_code(c);
    if (key_index(c) >= 0) expected[key_index(c)] = 1'b0;
    check({up, down, left, right} == expected,
          $sformatf("after release %02h keys %b, expected %b", c, {up, down, left, right}, expected));
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] arrows [4] = '{8'h75, 8'h72, 8'h6B, 8'h74};
    expected = '0;
    scancode = '0;
    scan_rdy = 1'b0;
    reset    = 1'b1;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (3) @(posedge clk);
    check({up, down, left, right} == 4'b0000, "keys clear after reset");
    check(!read_en, "no read_en while idle");

    // Each arrow on its own
    foreach (arrows[i]) begin
      press(arrows[i]);
      press(arrows[i]);         // typematic repeat
      release_key(arrows[i]);
      press(arrows[i]);         // pressed again right after release
      release_key(arrows[i]);
    end

    // Un-prefixed codes (keypad 8, 2, 4, 6) and plain releases are ignored
    press(8'h75);
    foreach (arrows[i]) begin
      put_code(arrows[i]);
      check({up, down, left, right} == expected, "un-prefixed code ignored");
    end
    put_code(8'hF0);
    put_code(8'h75);
    check({up, down, left, right} == expected, "F0 without E0 ignored");
    // Other extended keys are ignored
    press(8'h1F);
    release_key(8'h1F);

    // Random press/release sequences
    for (int n = 0; n < 60; n++) begin
      int k = int'($urandom_range(3, 0));
      if ($urandom_range(1, 0) == 1) press(arrows[k]);
      else                           release_key(arrows[k]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
