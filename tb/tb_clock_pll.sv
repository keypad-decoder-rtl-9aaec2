// tb_clock_pll: checks the clock model's output frequency and duty cycle at
// its default ratio (50 MHz in, 10 kHz out, DIVIDE = 5000).
//
// inclk0 runs at 50 MHz (20 ns period). For five c0 periods the testbench
// counts inclk0 rising edges per c0 period (expected 5000) and per high phase
// (expected 2500), and measures the c0 period in time (expected 100 us).
module tb_clock_pll;

  localparam int unsigned DIVIDE = 5000;

  int checks = 0;
  int failures = 0;

  logic inclk0 = 1'b0;
  logic c0;

  clock_pll dut (.inclk0(inclk0), .c0(c0));

  always #10ns inclk0 = ~inclk0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int edges = 0;
  int high_edges = 0;
  always @(posedge inclk0) begin
    edges++;
    if (c0) high_edges++;
  end

  initial begin
    repeat (20 * DIVIDE) @(posedge inclk0);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    @(posedge c0);
    for (int p = 0; p < 5; p++) begin
      t0 = $realtime;
      edges = 0;
      high_edges = 0;
      @(posedge c0);
      t1 = $realtime;
      check($sformatf("inclk0 edges in period %0d", p), longint'(edges), longint'(DIVIDE));
      check($sformatf("inclk0 edges high in period %0d", p), longint'(high_edges), longint'(DIVIDE / 2));
      check($sformatf("period %0d in ns", p), longint'((t1 - t0) / 1ns), 100000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
