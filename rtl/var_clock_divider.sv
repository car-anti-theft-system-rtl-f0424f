// var_clock_divider: clock divider whose divisor may change while it runs.
//
// A counter runs from 0 and wraps when it reaches divisor-1 or anything
// above it, issuing a tick on each wrap. Comparing with ">=" rather than
// "==" is what makes the divisor safe to change on the fly: if the divisor
// drops below the current count, the next cycle wraps instead of the counter
// running on through its whole range. The siren uses one of these for the
// tone, with a divisor swept up and down, and one with a fixed divisor for
// the sweep rate.
//
// Interface: clk, rst (synchronous, active high), divisor (W bits, cycles
// per tick; 0 behaves as 1), tick.
// Timing: tick is registered; with a constant divisor D it is high one cycle
// in every D, the first one D+1 cycles after the cycle in which rst was high.
// The ">=" compare and the registered tick follow the original design; the
// overflow-safe compare and tick held low under reset are choices here.
module var_clock_divider #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] divisor,
  output logic         tick
);

  logic [W-1:0] count_q;
  logic         wrap;

  // count >= divisor - 1, written so that divisor = 0 cannot underflow.
  assign wrap = ({1'b0, count_q} + 1'b1) >= {1'b0, divisor};

  always_ff @(posedge clk) begin
    if (rst || wrap) count_q <= '0;
    else             count_q <= count_q + 1'b1;
    tick <= wrap && !rst;
  end

endmodule
