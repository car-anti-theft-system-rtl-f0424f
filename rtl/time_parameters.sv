// time_parameters: store of the four alarm delays, with user reprogramming.
//
// Four 4-bit registers hold, in seconds, the arming delay (code 00), the
// driver-door countdown (01), the passenger-door countdown (10) and the
// siren-on time after the doors close (11). Reset restores the factory
// defaults 6, 8, 15 and 10 s. While reprogram is high, the time-value
// switches are written into the register chosen by the parameter-selector
// switches. Every cycle the register chosen by the controller's interval
// code is copied to the value output.
//
// Interface: clk, rst (synchronous, active high), reprogram, parm_sel
// (which delay to write), time_val (new value), interval (which delay to
// read), value (to the timer).
// Timing: value is registered, one cycle behind interval; the controller
// therefore sets interval one cycle before it starts the timer. A write is
// visible on value one cycle after it takes effect. Codes, defaults and the
// registered read follow the original design; the reset value of the value
// register (the arming delay, matching the reset interval) is a choice here.
module time_parameters
  import antitheft_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              reprogram,
  input  interval_e         parm_sel,
  input  logic [TIME_W-1:0] time_val,
  input  interval_e         interval,
  output logic [TIME_W-1:0] value
);

  logic [TIME_W-1:0] params_q [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      params_q[SEL_ARM]       <= T_ARM_DEFAULT;
      params_q[SEL_DRIVER]    <= T_DRIVER_DEFAULT;
      params_q[SEL_PASSENGER] <= T_PASSENGER_DEFAULT;
      params_q[SEL_ALARM]     <= T_ALARM_DEFAULT;
      value                   <= T_ARM_DEFAULT;
    end else begin
      if (reprogram) params_q[parm_sel] <= time_val;
      value <= params_q[interval];
    end
  end

endmodule
