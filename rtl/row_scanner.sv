// row_scanner: three-state row scan controller for a 3x3 switch matrix.
//
// Each state drives one row low. On every clock edge the machine moves to the
// next row (row(3) -> row(2) -> row(1) -> row(3)) when all three columns read
// high, and stays put while any column is low, so a held key keeps its row
// driven and the decoder sees a steady row/column pair. The state code is the
// row pattern itself and is driven straight onto `row`.
//
// Interface: clk is the 10 kHz scan clock; rst_n is a synchronous active-low
// reset (e.g. the KEY(0) pushbutton) that selects row(3). col is read in the
// same cycle the row is driven: there is no synchroniser, because the column
// must answer the row currently driven and a synchronising delay would put it
// out of step. Any state code that is not one of the three valid ones
// (including an all-zero power-up value) returns to row(3) on the next clock.
//
// The three states, their order and the hold-on-any-low-column rule follow the
// lab description; the reset input and the invalid-state recovery are both
// built here, the description leaving the choice of reset open.
module row_scanner
  import keypad_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  lines_t col,
  output lines_t row
);

  scan_state_t state_q;
  scan_state_t state_d;

  always_comb begin
    if (col != COL_IDLE) begin
      // A key in the driven row is pressed: hold, unless the code is invalid.
      unique case (state_q)
        SCAN_ROW3, SCAN_ROW2, SCAN_ROW1: state_d = state_q;
        default:                         state_d = SCAN_ROW3;
      endcase
    end else begin
      unique case (state_q)
        SCAN_ROW3: state_d = SCAN_ROW2;
        SCAN_ROW2: state_d = SCAN_ROW1;
        SCAN_ROW1: state_d = SCAN_ROW3;
        default:   state_d = SCAN_ROW3;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= SCAN_ROW3;
    else        state_q <= state_d;
  end

  assign row = state_q;

endmodule
