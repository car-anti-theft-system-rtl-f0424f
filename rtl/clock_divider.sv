// clock_divider: one-cycle tick every DIVISOR system clocks.
//
// A counter runs from 0 to DIVISOR-1 and wraps; the tick output is high
// while the counter holds DIVISOR-1. The tick is an enable for logic on the
// system clock, not a clock of its own. With DIVISOR = 27 000 000 and a
// 27 MHz clock it is the 1 Hz time base of the countdown timer and of the
// status-light blinker.
//
// Interface: clk, rst (synchronous, active high; restarts the count), tick.
// Timing: after a cycle with rst high, the first tick comes DIVISOR cycles
// later and then every DIVISOR cycles. The timer's divider has start_timer
// ORed into rst so its first tick is exactly one second after the start.
// Design choice: tick is held low in a cycle in which rst is high, so a
// restart never coincides with a stale tick.
module clock_divider #(
  parameter int unsigned DIVISOR = 27_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned CW = (DIVISOR < 2) ? 1 : $clog2(DIVISOR);
  localparam logic [CW-1:0] LAST = CW'(DIVISOR - 1);

  logic [CW-1:0] count_q;

  always_ff @(posedge clk) begin
    if (rst || count_q == LAST) count_q <= '0;
    else                        count_q <= count_q + 1'b1;
  end

  assign tick = (count_q == LAST) && !rst;

endmodule
