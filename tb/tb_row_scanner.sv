// tb_row_scanner: cycle-by-cycle check of the row scan controller.
//
// A reference model of the scan rule runs beside the scanner: after reset the
// row is 011; on each clock it moves 011 -> 101 -> 110 -> 011 when col reads
// 111 and holds otherwise. The testbench checks the row after every clock
// and counts each mechanism: reset, advance, wrap-around, hold, and recovery
// from invalid state codes (forced into the register, including the all-zero
// power-up code). It then presses each key through the keypad model at a
// random time and checks that the scanner stops on that key's row within
// three clocks and stays there while the key is held.
module tb_row_scanner;
  import keypad_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       use_kp;
  lines_t     col_drv, col_kp, col, row;
  logic [9:1] pressed;

  keypad_model u_kp (.row(row), .pressed(pressed), .col(col_kp));
  assign col = use_kp ? col_kp : col_drv;

  row_scanner dut (.clk(clk), .rst_n(rst_n), .col(col), .row(row));

  always #5 clk = ~clk;

  int n_reset = 0, n_advance = 0, n_wrap = 0, n_hold = 0, n_recover = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic lines_t next_row(input lines_t r);
    case (r)
      3'b011:  return 3'b101;
      3'b101:  return 3'b110;
      3'b110:  return 3'b011;
      default: return 3'b011;
    endcase
  endfunction

  // One clock with the reference rule; inputs are steady around the edge.
  task automatic step(input string what);
    lines_t prev, exp;
    @(negedge clk);
    prev = row;
    if (!rst_n)             exp = 3'b011;
    else if (col != 3'b111) exp = (prev inside {3'b011, 3'b101, 3'b110}) ? prev : 3'b011;
    else                    exp = next_row(prev);
    @(posedge clk);
    #1;
    check(what, int'(row), int'(exp));
    if (row == exp) begin
      if (!rst_n)                                              n_reset++;
      else if (!(prev inside {3'b011, 3'b101, 3'b110}))      n_recover++;
      else if (col != 3'b111)                                  n_hold++;
      else if (prev == 3'b110)                               n_wrap++;
      else                                                     n_advance++;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    use_kp  = 1'b0;
    pressed = '0;
    col_drv = 3'b111;
    rst_n   = 1'b0;
    repeat (2) step("reset");
    rst_n = 1'b1;

    // Free scan.
    repeat (9) step("free scan");

    // Hold with each non-idle column pattern, in each row.
    for (int i = 0; i < 21; i++) begin
      col_drv = (i % 7 == 6) ? 3'b111 : 3'(i % 7);
      repeat (3) step($sformatf("col=%b", col_drv));
    end
    col_drv = 3'b111;

    // Reset from the middle of the scan.
    step("scan");
    rst_n = 1'b0;
    step("reset mid-scan");
    rst_n = 1'b1;

    // Invalid codes forced into the state register, idle and pressed columns.
    for (int code = 0; code < 8; code++) begin
      if (code inside {3, 5, 6}) continue;
      for (int held = 0; held < 2; held++) begin
        @(posedge clk);
        #1;
        force dut.state_q = scan_state_t'(code);
        #1;
        release dut.state_q;
        col_drv = (held != 0) ? 3'b101 : 3'b111;
        step($sformatf("recover from %b col=%b", code, col_drv));
        col_drv = 3'b111;
      end
    end

    // Key presses through the keypad model, at random points of the scan.
    use_kp = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 1; k <= 9; k++) begin
        automatic int waited = 0;
        automatic lines_t want = 3'b111;
        want[2 - (k - 1) / 3] = 1'b0;
        repeat ($urandom_range(0, 4)) step("idle scan");
        pressed[k] = 1'b1;
        while (row != want && waited < 5) begin
          step($sformatf("seek key %0d", k));
          waited++;
        end
        checks++;
        if (row != want || waited > 2) begin
          failures++;
          $display("FAIL key %0d: row %b after %0d clocks", k, row, waited);
        end
        repeat (4) step($sformatf("hold key %0d", k));
        check($sformatf("held row key %0d", k), int'(row), int'(want));
        pressed = '0;
        step($sformatf("release key %0d", k));
      end
    end

    checks++;
    if (n_reset == 0 || n_advance == 0 || n_wrap == 0 || n_hold == 0 || n_recover == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: reset=%0d advance=%0d wrap=%0d hold=%0d recover=%0d",
             n_reset, n_advance, n_wrap, n_hold, n_recover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
