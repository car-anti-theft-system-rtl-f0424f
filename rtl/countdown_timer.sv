// countdown_timer: seconds countdown for the alarm controller's delays.
//
// A 4-bit counter and a "timing" flag. A start strobe loads the counter from
// the value input and sets the flag; a start while counting restarts the
// countdown from the new value. While the flag is set, every one-second tick
// decrements the counter. When the counter is zero with the flag set, the
// flag clears, and that condition, turned into a one-cycle strobe, is the
// expired output.
//
// Interface: clk, rst (synchronous, active high), tick (1 Hz enable from the
// divider, which is restarted by the same start strobe), value (seconds),
// start (one-cycle strobe), expired (one-cycle strobe), count (for display).
// Timing: with the divider restarted by start, expired is high exactly
// V*CYCLES_PER_TICK + 1 cycles after the start cycle for a loaded value V
// (one cycle after start for V = 0).
// Design choice: start has priority over a tick or a zero count in the same
// cycle; the original design leaves that ordering to the order of its
// statements.
module countdown_timer #(
  parameter int unsigned W = antitheft_pkg::TIME_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tick,
  input  logic [W-1:0] value,
  input  logic         start,
  output logic         expired,
  output logic [W-1:0] count
);

  logic timing_q;
  logic done;

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      timing_q <= 1'b0;
    end else if (start) begin
      count    <= value;
      timing_q <= 1'b1;
    end else if (timing_q) begin
      if (count == '0)  timing_q <= 1'b0;
      else if (tick)    count    <= count - 1'b1;
    end
  end

  assign done = timing_q && (count == '0);

  level_to_pulse u_expired_pulse (
    .clk  (clk),
    .rst  (rst),
    .level(done),
    .pulse(expired)
  );

  // The expired strobe lasts exactly one cycle.
  a_expired_one_cycle: assert property (@(posedge clk) disable iff (rst)
    expired |=> !expired);

endmodule
