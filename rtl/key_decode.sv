// key_decode: combinational key value from the driven row and the columns.
//
// Exactly one row is low while the scanner drives it; a pressed key in that
// row pulls its column low. The key value is 3*r + c + 1, where r = 0, 1, 2
// for row(3), row(2), row(1) and c = 0, 1, 2 for col(3), col(2), col(1), which
// gives the keypad digits 1..9. Any other combination (no key, two keys in one
// row, or an invalid row pattern) gives 0, so the LEDs are dark when nothing
// is pressed.
//
// Interface: row and col are 3-bit vectors with bit 2 = row(3)/col(3); value
// is the 4-bit binary digit for LED(3..0). Purely combinational, no latency.
// The mapping and the zero default follow the lab description; only single
// key presses are decoded, as it requires.
module key_decode
  import keypad_pkg::*;
(
  input  lines_t     row,
  input  lines_t     col,
  output key_value_t value
);

  // Index 0..2 of the single low line in a one-cold vector (bit 2 -> 0),
  // valid only when exactly one line is low.
  function automatic logic [1:0] cold_index(input lines_t v);
    unique case (v)
      3'b011:  return 2'd0;
      3'b101:  return 2'd1;
      3'b110:  return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  logic [1:0] r_idx;
  logic [1:0] c_idx;

  always_comb begin
    r_idx = cold_index(row);
    c_idx = cold_index(col);
    if (r_idx == 2'd3 || c_idx == 2'd3)
      value = '0;
    else
      value = key_value_t'(r_idx) * 4'd3 + key_value_t'(c_idx) + 4'd1;
  end

endmodule
