// clock_pll: behavioural model of the board's clock component (a vendor PLL)
// that turns the 50 MHz board clock into the 10 kHz scan clock.
//
// The real part is a ready-made PLL whose insides are not part of this design;
// only its ports (inclk0 in, c0 out) and its 50 MHz -> 10 kHz ratio are. This
// model reproduces them with a counter: c0 toggles every DIVIDE/2 rising edges
// of inclk0, giving a 50 % duty-cycle clock at inclk0/DIVIDE. It has no phase
// locking, lock indication or jitter. The counter and c0 start at 0 (set by
// an initial block, hence the plain always process); a counter value past
// the half period, which cannot arise from that start, ends the half period
// on the next edge.
//
// Timing: c0 changes one inclk0 clock-to-output after the inclk0 edge that
// completes each half period; its first rising edge comes DIVIDE/2 inclk0
// cycles after start-up.
module clock_pll #(
  parameter int unsigned DIVIDE = 5000   // inclk0 cycles per c0 cycle (even)
) (
  input  logic inclk0,
  output logic c0
);

  localparam int unsigned HALF = (DIVIDE < 2) ? 1 : DIVIDE / 2;
  localparam int unsigned CW   = (HALF < 2) ? 1 : $clog2(HALF);

  logic [CW-1:0] count_q;
  logic          c0_q;

  initial begin
    count_q = '0;
    c0_q    = 1'b0;
  end

  always @(posedge inclk0) begin
    if (count_q >= CW'(HALF - 1)) begin
      count_q <= '0;
      c0_q    <= ~c0_q;
    end else begin
      count_q <= count_q + 1'b1;
    end
  end

  assign c0 = c0_q;

endmodule
