// keypad_pkg: types and constants shared by the 3x3 keypad decoder.
//
// The scanner's state code is the row pattern it drives, so the state
// register can feed the row outputs directly. Bit 2 of a row/column vector is
// row(3)/col(3), bit 0 is row(1)/col(1). row(3) is the conductor along keys
// 1-2-3 and col(3) the conductor along keys 1-4-7. A driven row is low (0);
// the column inputs are pulled up and read 1 unless a pressed key in the
// driven row pulls one low.
package keypad_pkg;

  // Row/column bus width: only the 3x3 digit part of the 4x4 keypad is used.
  localparam int unsigned LINES = 3;

  typedef logic [LINES-1:0] lines_t;

  // Scan states, named after the row that is driven low.
  typedef enum logic [LINES-1:0] {
    SCAN_ROW3 = 3'b011,   // keys 1, 2, 3
    SCAN_ROW2 = 3'b101,   // keys 4, 5, 6
    SCAN_ROW1 = 3'b110    // keys 7, 8, 9
  } scan_state_t;

  // Column value when no key of the driven row is pressed.
  localparam lines_t COL_IDLE = 3'b111;

  // Width of the binary key value shown on LED(3..0).
  localparam int unsigned VALUE_W = 4;

  typedef logic [VALUE_W-1:0] key_value_t;

endpackage
