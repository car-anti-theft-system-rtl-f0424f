// anti_theft_fsm: the alarm controller.
//
// Eleven states. ARMED (light blinking) watches the doors: the driver door
// leads through D_TRIG_SET to DRIVER_TRIG, the passenger door through
// P_TRIG_SET to PASSENGER_TRIG; both TRIG states keep the light on and run
// the timer with that door's delay. When it expires the machine enters
// SOUND_ALARM (siren on). Once both doors are closed it moves to REARM_TIME,
// which keeps the siren on and times the siren-on delay; a door opening
// returns to SOUND_ALARM, expiry returns to ARMED. The ignition, from any of
// these states, disarms: DISARMED (light off) waits for the ignition to go
// off (DOOR_WAIT_O), then for the driver door to open (DOOR_WAIT_C), then for
// both doors to close (ARM_WAIT), which times the arming delay and re-arms.
// A door opening during ARM_WAIT goes back to DOOR_WAIT_C. Reset and the
// reprogram button both force ARMED.
//
// Each state owns a 6-bit output word {timer_on, interval, light mode,
// siren_on}; the word is registered, one cycle behind the state. The timer
// start strobe is the rising edge of timer_on. Because the time-parameter
// store also answers one cycle late, every state that runs the timer is
// entered from a state that already selects the same interval: the two
// *_TRIG_SET states exist only for that.
//
// Interface: clk, rst (synchronous, active high), debounced ignition,
// driver, passenger (door open = 1) and reprogram; expired strobe from the
// timer; interval and start_timer to the time store and timer; light (status
// indicator); siren_en; state (for display).
// Timing: outputs change one cycle after the state does; start_timer pulses
// in the first cycle the registered timer_on is high. State codes, output
// words, transitions and their priority (ignition first) follow the original
// design. Choices here: reset/reprogram take priority over every transition,
// and the output word is reset to ARMED's word.
module anti_theft_fsm
  import antitheft_pkg::*;
#(
  parameter int unsigned BLINK_DIVISOR = SYS_CLK_HZ
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ignition,
  input  logic       driver,
  input  logic       passenger,
  input  logic       reprogram,
  input  logic       expired,
  output interval_e  interval,
  output logic       start_timer,
  output logic       light,
  output logic       siren_en,
  output fsm_state_e state
);

  fsm_state_e   state_d;
  fsm_outputs_t outs_q;

  // Output word of each state.
  function automatic fsm_outputs_t state_outputs(fsm_state_e s);
    unique case (s)
      ST_ARMED:          return '{1'b0, SEL_ARM,       LIGHT_BLINK, 1'b0};
      ST_P_TRIG_SET:     return '{1'b0, SEL_PASSENGER, LIGHT_BLINK, 1'b0};
      ST_D_TRIG_SET:     return '{1'b0, SEL_DRIVER,    LIGHT_BLINK, 1'b0};
      ST_PASSENGER_TRIG: return '{1'b1, SEL_PASSENGER, LIGHT_ON,    1'b0};
      ST_DRIVER_TRIG:    return '{1'b1, SEL_DRIVER,    LIGHT_ON,    1'b0};
      ST_SOUND_ALARM:    return '{1'b0, SEL_ALARM,     LIGHT_ON,    1'b1};
      ST_REARM_TIME:     return '{1'b1, SEL_ALARM,     LIGHT_ON,    1'b1};
      ST_DISARMED:       return '{1'b0, SEL_ARM,       LIGHT_OFF,   1'b0};
      ST_DOOR_WAIT_O:    return '{1'b0, SEL_ARM,       LIGHT_OFF,   1'b0};
      ST_DOOR_WAIT_C:    return '{1'b0, SEL_ARM,       LIGHT_OFF,   1'b0};
      ST_ARM_WAIT:       return '{1'b1, SEL_ARM,       LIGHT_OFF,   1'b0};
      default:           return '{1'b0, SEL_ARM,       LIGHT_BLINK, 1'b0};
    endcase
  endfunction

  // Next state.
  always_comb begin
    state_d = state;
    case (state)
      ST_ARMED:
        if (ignition)       state_d = ST_DISARMED;
        else if (driver)    state_d = ST_D_TRIG_SET;
        else if (passenger) state_d = ST_P_TRIG_SET;
      ST_P_TRIG_SET:        state_d = ST_PASSENGER_TRIG;
      ST_D_TRIG_SET:        state_d = ST_DRIVER_TRIG;
      ST_PASSENGER_TRIG,
      ST_DRIVER_TRIG:
        if (ignition)       state_d = ST_DISARMED;
        else if (expired)   state_d = ST_SOUND_ALARM;
      ST_SOUND_ALARM:
        if (ignition)                 state_d = ST_DISARMED;
        else if (!driver && !passenger) state_d = ST_REARM_TIME;
      ST_REARM_TIME:
        if (ignition)                state_d = ST_DISARMED;
        else if (driver || passenger) state_d = ST_SOUND_ALARM;
        else if (expired)            state_d = ST_ARMED;
      ST_DISARMED:
        if (!ignition)      state_d = ST_DOOR_WAIT_O;
      ST_DOOR_WAIT_O:
        if (ignition)       state_d = ST_DISARMED;
        else if (driver)    state_d = ST_DOOR_WAIT_C;
      ST_DOOR_WAIT_C:
        if (ignition)                 state_d = ST_DISARMED;
        else if (!driver && !passenger) state_d = ST_ARM_WAIT;
      ST_ARM_WAIT:
        if (ignition)                state_d = ST_DISARMED;
        else if (driver || passenger) state_d = ST_DOOR_WAIT_C;
        else if (expired)            state_d = ST_ARMED;
      default:              state_d = ST_ARMED;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || reprogram) state <= ST_ARMED;
    else                  state <= state_d;
  end

  always_ff @(posedge clk) begin
    if (rst) outs_q <= state_outputs(ST_ARMED);
    else     outs_q <= state_outputs(state);
  end

  assign interval = outs_q.interval;
  assign siren_en = outs_q.siren_on;

  level_to_pulse u_start_pulse (
    .clk  (clk),
    .rst  (rst),
    .level(outs_q.timer_on),
    .pulse(start_timer)
  );

  light_control #(.BLINK_DIVISOR(BLINK_DIVISOR)) u_light (
    .clk  (clk),
    .rst  (rst),
    .mode (outs_q.light),
    .light(light)
  );

  // The timer is only started with the interval that was already selected
  // in the previous cycle (the time store answers one cycle late).
  a_interval_setup: assert property (@(posedge clk) disable iff (rst)
    start_timer |-> interval == $past(interval));

endmodule
