// tb_keypad_decoder: end-to-end test of the keypad decoder at its default
// parameters (50 MHz board clock, 10 kHz scan clock).
//
// The keypad model closes the loop between the row outputs and the column
// inputs. Two checkers run throughout:
//  - on every falling edge of the 50 MHz clock the LEDs must equal the value
//    of the key that is pressed if its row is driven (0 otherwise), with
//    LED(7..4) always off;
//  - on every scan clock edge the new row must follow the scan rule (reset to
//    011, hold while a column is low, otherwise 011 -> 101 -> 110 -> 011).
// The stimulus resets the scanner with KEY(0), lets it scan freely, puts the
// all-zero power-up code into the state register, and then presses every key
// 1..9 twice, in shuffled order and at random points of the scan. For each
// press it checks that the LEDs show the key within two scan clock edges,
// that the row and LEDs stay steady while the key is held, and that the LEDs
// go dark as soon as it is released. Each mechanism is counted and one that
// never happened counts as a failure.
module tb_keypad_decoder;
  import keypad_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clock_50 = 1'b0;
  logic       key0_n;
  lines_t     col, row;
  logic [7:0] led;
  logic [9:1] pressed;

  keypad_model u_kp (.row(row), .pressed(pressed), .col(col));

  keypad_decoder dut (
    .clock_50 (clock_50),
    .key0_n   (key0_n),
    .col      (col),
    .row      (row),
    .led      (led)
  );

  always #10ns clock_50 = ~clock_50;

  int n_reset = 0, n_advance = 0, n_wrap = 0, n_hold = 0, n_recover = 0, n_release = 0;
  int n_key[1:9];

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Expected LED value: the pressed key whose row is driven low.
  function automatic int expected_led(input lines_t r, input logic [9:1] p);
    int v = 0;
    int n = 0;
    for (int k = 1; k <= 9; k++) begin
      if (p[k] && !r[2 - (k - 1) / 3]) begin
        v = k;
        n++;
      end
    end
    return (n == 1 && $countones(r) == 2) ? v : 0;
  endfunction

  // LED checker.
  always @(negedge clock_50) begin
    checks++;
    if (int'(led) != expected_led(row, pressed))
      fail($sformatf("led=%b row=%b pressed=%b", led, row, pressed));
  end

  // Scan rule checker.
  always @(posedge dut.scan_clk) begin
    automatic lines_t prev = row;
    automatic lines_t c    = col;
    automatic logic   rn   = key0_n;
    automatic lines_t exp;
    automatic bit     valid = prev inside {3'b011, 3'b101, 3'b110};
    if (!rn)                exp = 3'b011;
    else if (!valid)        exp = 3'b011;
    else if (c != 3'b111)   exp = prev;
    else if (prev == 3'b011) exp = 3'b101;
    else if (prev == 3'b101) exp = 3'b110;
    else                    exp = 3'b011;
    #1ns;
    checks++;
    if (row != exp) fail($sformatf("scan: row %b -> %b, expected %b (col %b)", prev, row, exp, c));
    else if (!rn)            n_reset++;
    else if (!valid)         n_recover++;
    else if (c != 3'b111)    n_hold++;
    else if (prev == 3'b110) n_wrap++;
    else                     n_advance++;
  end

  // Watchdog: far more than the stimulus needs (about 300 scan periods).
  initial begin
    repeat (2000 * 5000) @(posedge clock_50);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[18];
    foreach (n_key[k]) n_key[k] = 0;
    pressed = '0;
    key0_n  = 1'b0;
    repeat (3) @(negedge dut.scan_clk);
    key0_n = 1'b1;
    checks++;
    if (row != 3'b011) fail($sformatf("after reset row=%b", row));

    repeat (7) @(negedge dut.scan_clk);

    // The all-zero power-up code must be left on the next scan edge.
    force dut.u_scanner.state_q = scan_state_t'(3'b000);
    #1ns;
    release dut.u_scanner.state_q;
    @(negedge dut.scan_clk);
    checks++;
    if (row != 3'b011) fail($sformatf("after power-up code row=%b", row));

    // Shuffled order, each key twice.
    foreach (order[i]) order[i] = i % 9 + 1;
    for (int i = 17; i > 0; i--) begin
      automatic int j = $urandom_range(0, i);
      automatic int t = order[i];
      order[i] = order[j];
      order[j] = t;
    end

    foreach (order[i]) begin
      automatic int     k      = order[i];
      automatic int     edges  = 0;
      automatic lines_t held_row;
      // Press at a random point of the scan.
      repeat ($urandom_range(1, 15000)) @(posedge clock_50);
      #3ns;
      pressed[k] = 1'b1;
      #1ns;
      while (int'(led) != k && edges < 4) begin
        @(posedge dut.scan_clk);
        #2ns;
        edges++;
      end
      checks++;
      if (int'(led) != k || edges > 2)
        fail($sformatf("key %0d: led=%0d after %0d scan edges", k, led, edges));
      else
        n_key[k]++;
      held_row = row;
      repeat (5) begin
        @(posedge dut.scan_clk);
        #2ns;
        checks++;
        if (row != held_row || int'(led) != k)
          fail($sformatf("key %0d held: row=%b led=%0d", k, row, led));
      end
      // Release half-way through a scan period.
      @(negedge dut.scan_clk);
      pressed = '0;
      #1ns;
      checks++;
      if (led != 8'd0) fail($sformatf("key %0d released: led=%0d", k, led));
      else n_release++;
      @(posedge dut.scan_clk);
      #2ns;
      checks++;
      if (row == held_row) fail($sformatf("key %0d released: scan did not resume", k));
    end

    checks++;
    if (n_reset == 0 || n_advance == 0 || n_wrap == 0 || n_hold == 0 ||
        n_recover == 0 || n_release == 0)
      fail("a scan mechanism never happened");
    for (int k = 1; k <= 9; k++) begin
      checks++;
      if (n_key[k] == 0) fail($sformatf("key %0d never decoded", k));
    end
    $display("mechanisms: reset=%0d advance=%0d wrap=%0d hold=%0d recover=%0d release=%0d",
             n_reset, n_advance, n_wrap, n_hold, n_recover, n_release);
    $display("keys decoded: %0d %0d %0d %0d %0d %0d %0d %0d %0d", n_key[1], n_key[2],
             n_key[3], n_key[4], n_key[5], n_key[6], n_key[7], n_key[8], n_key[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
