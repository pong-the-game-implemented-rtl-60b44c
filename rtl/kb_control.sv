// kb_control: arrow-key state tracker.
//
// Consumes scan codes from the keyboard receiver and keeps one level output
// per arrow key that is high while the key is held down. The arrow keys send
// E0 <code> when pressed and E0 F0 <code> when released, with up = 75,
// down = 72, left = 6B and right = 74 (hex).
//
// How it works: a two-state machine waits in IDLE until scan_ready is high,
// then spends one clock in READ, where it asserts read_en (clearing the
// receiver's ready flag) and interprets the code. A prefix status remembers
// what came before the code: NONE, EXT (E0 seen) or EXT_BREAK (E0 F0 seen).
// An arrow code after EXT sets its key, after EXT_BREAK clears it; any other
// byte returns the status to NONE, so F0-prefixed releases of ordinary keys
// and codes without E0 (the numeric keypad) are ignored.
//
// Interface: reset is active high and clears the keys. read_en is high in the
// READ state only, one clock per scan code. Key outputs change at the end of
// the READ clock, so two clocks after scan_ready rises.
//
// Follows the original in the two-state chart (IDLE/READ), the read_en
// handshake and the three-valued prefix status. This design's own choices:
// an E0 byte always starts a new prefix, and the status returns to NONE after
// every non-prefix byte, so a key press that follows a release is recognised
// at once.
module kb_control
  import pong_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] scancode,
  input  logic       scan_rdy,
  output logic       read_en,
  output logic       up,
  output logic       down,
  output logic       left,
  output logic       right
);

  typedef enum logic {IDLE, READ} state_t;
  typedef enum logic [1:0] {NONE, EXT, EXT_BREAK} status_t;

  state_t  state;
  status_t status;

  assign read_en = (state == READ);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state  <= IDLE;
      status <= NONE;
      up     <= 1'b0;
      down   <= 1'b0;
      left   <= 1'b0;
      right  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (scan_rdy) state <= READ;
        READ: begin
          state <= IDLE;
          if (scancode == SC_EXTEND) begin
            status <= EXT;
          end else if (scancode == SC_BREAK) begin
            status <= (status == EXT) ? EXT_BREAK : NONE;
          end else begin
            if (status != NONE) begin
              // key value: 1 for a make (E0 code), 0 for a break (E0 F0 code)
              case (scancode)
                SC_UP:    up    <= (status == EXT);
                SC_DOWN:  down  <= (status == EXT);
                SC_LEFT:  left  <= (status == EXT);
                SC_RIGHT: right <= (status == EXT);
                default: ;
              endcase
            end
            status <= NONE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
