// level_to_pulse: one-cycle pulse on the rising edge of a level.
//
// The level is registered once; the output is high in the first cycle in
// which the level is high after having been low, so a level held for many
// cycles yields exactly one pulse. This is how the controller's timer-enable
// flag becomes the timer's start strobe, how the timer's "count is zero"
// condition becomes the expired strobe, and how mode entries are detected.
//
// Interface: clk, rst (synchronous, active high), level in, pulse out.
// Timing: pulse is combinational from level, in the same cycle as the edge.
// Design choice: the edge register is set to 1 on reset, so a level that is
// already high when reset ends gives no pulse (the reference circuit had no
// reset on this register).
module level_to_pulse (
  input  logic clk,
  input  logic rst,
  input  logic level,
  output logic pulse
);

  logic level_q;

  always_ff @(posedge clk) begin
    if (rst) level_q <= 1'b1;
    else     level_q <= level;
  end

  assign pulse = level & ~level_q;

endmodule
