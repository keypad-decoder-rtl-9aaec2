// keypad_decoder: top level of the 3x3 numeric keypad decoder.
//
// The 50 MHz board clock feeds the clock component, whose 10 kHz output clocks
// the row scanner. The scanner drives one of row(3..1) low at a time and
// stops on a row where a column reads low; the decoder turns that row/column
// pair into the key's binary value 1..9 on LED(3..0). LED(7..4) stay off, and
// all LEDs are off while no key is pressed.
//
// Ports: clock_50 (50 MHz), key0_n (pushbutton KEY(0), low = reset the
// scanner), col(3..1) from keypad pins 4..2 (pulled up at the pins), row(3..1)
// to keypad pins 8..6, led(7..0). The LED value is combinational from the
// registered row and the live columns, so it follows a press within the scan
// clock cycle in which its row is driven, i.e. at most three 10 kHz cycles
// after the press, and goes dark as soon as the key is released.
//
// Structure, scan clock and LED assignment follow the lab description; the
// reset pushbutton and the use of LED(7..4) as always-off are choices made
// here.
module keypad_decoder
  import keypad_pkg::*;
#(
  parameter int unsigned DIVIDE = 5000   // 50 MHz / 10 kHz
) (
  input  logic       clock_50,
  input  logic       key0_n,
  input  lines_t     col,
  output lines_t     row,
  output logic [7:0] led
);

  logic       scan_clk;
  key_value_t value;

  clock_pll #(.DIVIDE(DIVIDE)) u_clock (
    .inclk0 (clock_50),
    .c0     (scan_clk)
  );

  row_scanner u_scanner (
    .clk   (scan_clk),
    .rst_n (key0_n),
    .col   (col),
    .row   (row)
  );

  key_decode u_decode (
    .row   (row),
    .col   (col),
    .value (value)
  );

  assign led = {4'b0000, value};

endmodule
