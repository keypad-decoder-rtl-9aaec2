// keypad_model: behavioural model of the 3x3 digit part of the keypad switch
// matrix together with the column pull-ups, for testbenches only.
//
// pressed[k] = 1 means digit key k (1..9) is held down. Key k sits on row
// r = (k-1)/3 and column c = (k-1)%3, where r = 0 is row(3) (keys 1-2-3) and
// c = 0 is col(3) (keys 1-4-7). A column reads low when some pressed key on it
// lies on a row that is driven low, and high (pulled up) otherwise. The model
// is combinational: the columns follow the rows with no delay.
module keypad_model
  import keypad_pkg::*;
(
  input  lines_t     row,
  input  logic [9:1] pressed,
  output lines_t     col
);

  always_comb begin
    col = COL_IDLE;
    for (int k = 1; k <= 9; k++) begin
      if (pressed[k] && !row[2 - (k - 1) / 3])
        col[2 - (k - 1) % 3] = 1'b0;
    end
  end

endmodule
