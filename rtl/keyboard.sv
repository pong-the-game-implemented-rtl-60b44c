// keyboard: PS/2 keyboard receiver.
//
// Receives the 11-bit frames a PS/2 keyboard sends (start bit 0, eight data
// bits LSB first, odd parity, stop bit 1) and presents each data byte as a
// scan code with a ready flag.
//
// How it works: the raw keyboard clock is noisy and slow (10-16 kHz), so it is
// first passed through an 8-stage shift register clocked by the system clock;
// the filtered clock only changes when all eight samples agree. Each rising
// edge of the filtered clock samples the data line: a 0 while idle is the
// start bit, the next nine bits (data and parity) are shifted in from the top
// of a 9-bit register, and the edge of the stop bit copies the low eight bits
// to scan_code and raises scan_ready. Parity is not checked.
//
// Interface: scan_ready stays high until the consumer pulses read for one
// clock; it is then low from the next clock on. reset is active high.
// Timing: scan_ready rises about ten system clocks after the stop bit's
// rising keyboard-clock edge (filter depth plus edge detection).
//
// Follows the original receiver in the filter, the sampling edge and the
// bit counting. This design's own choices: everything runs in the system
// clock domain (the filtered keyboard clock is used as an edge-detected
// enable, not as a clock), the data line is brought in through two flip-flops,
// and scan_ready is a synchronous flag cleared by read.
module keyboard (
  input  logic       clk,
  input  logic       reset,
  input  logic       kb_clk,
  input  logic       kb_data,
  input  logic       read,
  output logic [7:0] scan_code,
  output logic       scan_ready
);

  localparam int unsigned FILTER_LEN = 8;
  localparam logic [3:0]  LAST_BIT   = 4'd9;  // data bits + parity

  logic [FILTER_LEN-1:0] filter;
  logic                  kb_clk_f, kb_clk_f_q;
  logic [1:0]            data_sync;
  logic                  reading;
  logic [3:0]            bit_cnt;
  logic [8:0]            shift;
  logic                  frame_done;

  wire kb_clk_rise = kb_clk_f & ~kb_clk_f_q;
  wire data_bit    = data_sync[1];

  // Clock filter and data synchroniser
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      filter     <= '1;
      kb_clk_f   <= 1'b1;
      kb_clk_f_q <= 1'b1;
      data_sync  <= 2'b11;
    end else begin
      filter     <= {kb_clk, filter[FILTER_LEN-1:1]};
      if (&filter)       kb_clk_f <= 1'b1;
      else if (~|filter) kb_clk_f <= 1'b0;
      kb_clk_f_q <= kb_clk_f;
      data_sync  <= {data_sync[0], kb_data};
    end
  end

  // Serial shift-in, one bit per filtered keyboard-clock rising edge
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      reading    <= 1'b0;
      bit_cnt    <= '0;
      shift      <= '0;
      scan_code  <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (kb_clk_rise) begin
        if (!reading) begin
          if (!data_bit) begin
            reading <= 1'b1;
            bit_cnt <= '0;
          end
        end else if (bit_cnt < LAST_BIT) begin
          bit_cnt <= bit_cnt + 4'd1;
          shift   <= {data_bit, shift[8:1]};
        end else begin
          scan_code  <= shift[7:0];
          reading    <= 1'b0;
          bit_cnt    <= '0;
          frame_done <= 1'b1;
        end
      end
    end
  end

  // Ready flag: set by a finished frame, cleared by read
  always_ff @(posedge clk or posedge reset) begin
    if (reset)           scan_ready <= 1'b0;
    else if (read)       scan_ready <= 1'b0;
    else if (frame_done) scan_ready <= 1'b1;
  end

endmodule
