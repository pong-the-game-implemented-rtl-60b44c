// vga_sync: 640 x 480 VGA timing generator.
//
// Counts pixel clocks (25 MHz nominal) across an 800-clock line and 525-line
// frame, produces the active-low horizontal and vertical sync pulses, tells
// the picture logic which pixel is being drawn (pixel_column, pixel_row), and
// blanks the colour inputs outside the visible 640 x 480 area.
//
// How it works: h_count runs 0..H_TOTAL-1. The line counter v_count advances
// once per line, when h_count is V_STEP_COL, and returns to 0 once it is at
// least V_TOTAL-1 and h_count is past V_STEP_COL. As in the original
// generator, that wrap fires on the clock right after v_count reaches 524, so
// line 524 lasts one clock and a frame is 524 lines (419,200 clocks, about
// 59.6 Hz at 25 MHz) rather than 525.
// Sync is low while H_SYNC_START <= h_count <= H_SYNC_END and while
// V_SYNC_START <= v_count <= V_SYNC_END. pixel_column / pixel_row follow the
// counters while they are inside the visible area and hold their last value
// outside it. Stage one registers the counters, syncs, visibility flags and
// pixel coordinates; stage two registers the blanked colour and the syncs
// again, so colour and sync leave the block aligned with each other.
//
// Timing: the colour inputs are expected to be a combinational function of
// pixel_row / pixel_column; red_out and the sync outputs are then both two
// clocks behind the counters. There is no reset: the counters wrap into their
// ranges by themselves within a frame of power-up.
//
// The counts, sync positions and the two register stages follow the original
// generator; the parameters that make them adjustable are this design's own.
module vga_sync #(
  parameter int unsigned H_VISIBLE    = 640,
  parameter int unsigned H_SYNC_START = 659,
  parameter int unsigned H_SYNC_END   = 755,
  parameter int unsigned H_TOTAL      = 800,
  parameter int unsigned V_STEP_COL   = 699,
  parameter int unsigned V_VISIBLE    = 480,
  parameter int unsigned V_SYNC_START = 493,
  parameter int unsigned V_SYNC_END   = 494,
  parameter int unsigned V_TOTAL      = 525
) (
  input  logic       clock_25mhz,
  input  logic       red,
  input  logic       green,
  input  logic       blue,
  output logic       red_out,
  output logic       green_out,
  output logic       blue_out,
  output logic       horiz_sync_out,
  output logic       vert_sync_out,
  output logic [9:0] pixel_row,
  output logic [9:0] pixel_column
);

  logic [9:0] h_count, v_count;
  logic       horiz_sync, vert_sync;
  logic       video_on_h, video_on_v;
  wire        video_on = video_on_h & video_on_v;

  always_ff @(posedge clock_25mhz) begin
    // Counters
    if (h_count >= 10'(H_TOTAL - 1)) h_count <= '0;
    else                             h_count <= h_count + 10'd1;

    if (v_count >= 10'(V_TOTAL - 1) && h_count >= 10'(V_STEP_COL)) v_count <= '0;
    else if (h_count == 10'(V_STEP_COL))                            v_count <= v_count + 10'd1;

    // Stage one: syncs, visibility, pixel coordinates
    horiz_sync <= !(h_count >= 10'(H_SYNC_START) && h_count <= 10'(H_SYNC_END));
    vert_sync  <= !(v_count >= 10'(V_SYNC_START) && v_count <= 10'(V_SYNC_END));

    video_on_h <= (h_count < 10'(H_VISIBLE));
    if (h_count < 10'(H_VISIBLE)) pixel_column <= h_count;
    video_on_v <= (v_count < 10'(V_VISIBLE));
    if (v_count < 10'(V_VISIBLE)) pixel_row <= v_count;

    // Stage two: blanked colour and syncs
    red_out        <= red   & video_on;
    green_out      <= green & video_on;
    blue_out       <= blue  & video_on;
    horiz_sync_out <= horiz_sync;
    vert_sync_out  <= vert_sync;
  end

endmodule
