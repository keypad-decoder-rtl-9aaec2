// tb_key_decode: exhaustive check of the combinational key decoder.
//
// All 64 row/column combinations are applied. The expected value is worked
// out from the keypad layout: if exactly one row line and exactly one column
// line are low, the key is 3*r + c + 1 with r, c counted from row(3)/col(3);
// otherwise 0. The hint pair row=011, col=011 (key 1) is also checked on its
// own, and the keypad model is used to check that a single press of each
// key 1..9, seen while its row is driven, decodes to that key.
module tb_key_decode;
  import keypad_pkg::*;

  int checks = 0;
  int failures = 0;

  lines_t     row, col, kp_col;
  key_value_t value, kp_value;
  logic [9:1] pressed;

  key_decode dut (.row(row), .col(col), .value(value));

  // A second decoder driven through the keypad model.
  lines_t kp_row;
  keypad_model u_kp (.row(kp_row), .pressed(pressed), .col(kp_col));
  key_decode dut_kp (.row(kp_row), .col(kp_col), .value(kp_value));

  function automatic int low_pos(input lines_t v);
    // Position counted from bit 2, or -1 unless exactly one bit is 0.
    int n = 0;
    int p = -1;
    for (int i = 0; i < 3; i++) begin
      if (!v[2 - i]) begin
        n++;
        p = i;
      end
    end
    return (n == 1) ? p : -1;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, c, expv;
    pressed = '0;
    kp_row  = 3'b111;
    for (int i = 0; i < 64; i++) begin
      {row, col} = 6'(i);
      #1;
      r = low_pos(row);
      c = low_pos(col);
      expv = (r >= 0 && c >= 0) ? 3 * r + c + 1 : 0;
      check($sformatf("row=%b col=%b", row, col), int'(value), expv);
    end

    row = 3'b011; col = 3'b011; #1;
    check("hint 011011", int'(value), 1);

    // Press each key alone; scan all three rows and look for it.
    for (int k = 1; k <= 9; k++) begin
      automatic int seen = 0;
      pressed = '0;
      pressed[k] = 1'b1;
      foreach (kp_row[j]) begin
        kp_row = 3'b111;
        kp_row[j] = 1'b0;
        #1;
        if (kp_value != 0) begin
          seen++;
          check($sformatf("key %0d via keypad", k), int'(kp_value), k);
        end
      end
      check($sformatf("key %0d seen in one row", k), seen, 1);
    end

    // No key: dark in every row.
    pressed = '0;
    foreach (kp_row[j]) begin
      kp_row = 3'b111;
      kp_row[j] = 1'b0;
      #1;
      check("no key", int'(kp_value), 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
