// car_antitheft_top: complete car anti-theft system.
//
// Twelve switch and button inputs are debounced. The ignition, brake and
// hidden switch feed the fuel-pump immobilizer. The ignition, both door
// switches and the reprogram button feed the alarm controller, which picks a
// delay from the time-parameter store (interval), starts the countdown timer
// (start_timer) and waits for its expired strobe, and drives the status light
// and the siren enable. The timer's one-second tick comes from a divider that
// start_timer also restarts, so a countdown of V seconds lasts exactly V
// seconds. The reprogram button, with the parameter-selector and time-value
// switches, also rewrites the store.
//
// Interface (all active high, on clk):
//   power_on_reset  reset held for the first cycles after power-up
//   reset_btn       user reset button (debounced here)
//   brake_sw, hidden_sw, ignition_sw, driver_door, passenger_door
//                   raw switches; a door input is 1 while the door is open
//   reprogram_btn, parm_sel_sw[1:0], time_val_sw[3:0]
//                   delay programming: while reprogram is pressed the value
//                   is written into the delay chosen by parm_sel (00 arming,
//                   01 driver door, 10 passenger door, 11 siren-on time)
//   fuel_pump_power, status_light, siren_out
//                   the three system outputs (siren_out is a square wave)
//   fsm_state, timer_count
//                   controller state code and countdown value, for a display
// Timing: every input reaches the logic DEBOUNCE_CYCLES+4 cycles after it
// settles. CLK_HZ is both the system clock frequency and the number of
// cycles in one second of every delay and blink. The structure follows the
// original design; active-high raw inputs (rather than the board's inverted
// buttons) and the two-flop input synchronizers are choices here.
module car_antitheft_top #(
  parameter int unsigned CLK_HZ          = antitheft_pkg::SYS_CLK_HZ,
  parameter int unsigned DEBOUNCE_CYCLES = 270_000
) (
  input  logic       clk,
  input  logic       power_on_reset,
  input  logic       reset_btn,
  input  logic       brake_sw,
  input  logic       hidden_sw,
  input  logic       ignition_sw,
  input  logic       driver_door,
  input  logic       passenger_door,
  input  logic       reprogram_btn,
  input  logic [1:0] parm_sel_sw,
  input  logic [3:0] time_val_sw,
  output logic       fuel_pump_power,
  output logic       status_light,
  output logic       siren_out,
  output logic [3:0] fsm_state,
  output logic [3:0] timer_count
);

  import antitheft_pkg::*;

  localparam int unsigned NUM_INPUTS = 12;

  logic                  user_reset;
  logic                  rst;
  logic [NUM_INPUTS-1:0] raw_in;
  logic [NUM_INPUTS-1:0] clean_in;

  logic       hidden, brake, ignition, driver, passenger, reprogram;
  interval_e  parm_sel;
  logic [3:0] time_val;

  interval_e         interval;
  logic              start_timer;
  logic              expired;
  logic              one_hz_tick;
  logic [TIME_W-1:0] value;
  logic              siren_en;
  fsm_state_e        state;

  // Global reset: power-on reset or the debounced user button.
  debouncer #(.DELAY(DEBOUNCE_CYCLES)) u_db_reset (
    .clk  (clk),
    .rst  (power_on_reset),
    .noisy(reset_btn),
    .clean(user_reset)
  );
  assign rst = user_reset || power_on_reset;

  // Debounce every other switch input.
  assign raw_in = {time_val_sw, parm_sel_sw, reprogram_btn, passenger_door,
                   driver_door, ignition_sw, brake_sw, hidden_sw};

  for (genvar i = 0; i < NUM_INPUTS; i++) begin : g_db
    debouncer #(.DELAY(DEBOUNCE_CYCLES)) u_db (
      .clk  (clk),
      .rst  (rst),
      .noisy(raw_in[i]),
      .clean(clean_in[i])
    );
  end

  assign {time_val, parm_sel, reprogram, passenger, driver, ignition, brake,
          hidden} = clean_in;

  fuel_pump_logic u_fuel_pump (
    .clk     (clk),
    .rst     (rst),
    .ignition(ignition),
    .brake   (brake),
    .hidden  (hidden),
    .pump    (fuel_pump_power)
  );

  anti_theft_fsm #(.BLINK_DIVISOR(CLK_HZ)) u_fsm (
    .clk        (clk),
    .rst        (rst),
    .ignition   (ignition),
    .driver     (driver),
    .passenger  (passenger),
    .reprogram  (reprogram),
    .expired    (expired),
    .interval   (interval),
    .start_timer(start_timer),
    .light      (status_light),
    .siren_en   (siren_en),
    .state      (state)
  );

  time_parameters u_time_params (
    .clk      (clk),
    .rst      (rst),
    .reprogram(reprogram),
    .parm_sel (parm_sel),
    .time_val (time_val),
    .interval (interval),
    .value    (value)
  );

  // The one-second base restarts with every timer start.
  clock_divider #(.DIVISOR(CLK_HZ)) u_one_hz (
    .clk (clk),
    .rst (rst || start_timer),
    .tick(one_hz_tick)
  );

  countdown_timer u_timer (
    .clk    (clk),
    .rst    (rst),
    .tick   (one_hz_tick),
    .value  (value),
    .start  (start_timer),
    .expired(expired),
    .count  (timer_count)
  );

  siren_generator #(.CLK_HZ(CLK_HZ)) u_siren (
    .clk      (clk),
    .rst      (rst),
    .siren_en (siren_en),
    .siren_out(siren_out)
  );

  assign fsm_state = state;

endmodule
