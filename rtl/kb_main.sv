// kb_main: keyboard front end.
//
// Joins the PS/2 receiver (keyboard) and the arrow-key tracker (kb_control):
// the receiver's scan_code / scan_ready go to the tracker, and the tracker's
// read_en acknowledges each code. The outputs are one level per arrow key,
// high while the key is held. There is no logic here beyond the wiring, as in
// the original. reset is active high; everything runs on clk.
module kb_main (
  input  logic clk,
  input  logic reset,
  input  logic keyboard_clk,
  input  logic keyboard_data,
  output logic up,
  output logic down,
  output logic left,
  output logic right
);

  logic [7:0] scancode;
  logic       scan_ready;
  logic       read_en;

  keyboard u_keyboard (
    .clk       (clk),
    .reset     (reset),
    .kb_clk    (keyboard_clk),
    .kb_data   (keyboard_data),
    .read      (read_en),
    .scan_code (scancode),
    .scan_ready(scan_ready)
  );

  kb_control u_kb_control (
    .clk     (clk),
    .reset   (reset),
    .scancode(scancode),
    .scan_rdy(scan_ready),
    .read_en (read_en),
    .up      (up),
    .down    (down),
    .left    (left),
    .right   (right)
  );

endmodule
