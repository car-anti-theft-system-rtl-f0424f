// antitheft_pkg: types and constants shared by the car anti-theft system.
//
// The alarm controller drives the rest of the system through a 6-bit output
// word {timer_on, interval[1:0], light_mode[1:0], siren_on}; this package gives
// that word a packed struct and its fields enums. The state codes 0..10 and
// the interval / light codes are the ones the design assigns them. The four
// default delays (seconds) are the factory values restored on reset.
package antitheft_pkg;

  // Which time parameter the time-parameter store presents to the timer.
  typedef enum logic [1:0] {
    SEL_ARM       = 2'b00,  // arming delay after the doors close
    SEL_DRIVER    = 2'b01,  // countdown after the driver door opens
    SEL_PASSENGER = 2'b10,  // countdown after the passenger door opens
    SEL_ALARM     = 2'b11   // siren-on time after all doors close
  } interval_e;

  // Status light mode.
  typedef enum logic [1:0] {
    LIGHT_OFF   = 2'b00,
    LIGHT_ON    = 2'b01,
    LIGHT_BLINK = 2'b10
  } light_mode_e;

  // The eleven states of the alarm controller.
  typedef enum logic [3:0] {
    ST_ARMED          = 4'h0,
    ST_P_TRIG_SET     = 4'h1,
    ST_D_TRIG_SET     = 4'h2,
    ST_PASSENGER_TRIG = 4'h3,
    ST_DRIVER_TRIG    = 4'h4,
    ST_SOUND_ALARM    = 4'h5,
    ST_REARM_TIME     = 4'h6,
    ST_DISARMED       = 4'h7,
    ST_DOOR_WAIT_O    = 4'h8,
    ST_DOOR_WAIT_C    = 4'h9,
    ST_ARM_WAIT       = 4'hA
  } fsm_state_e;

  // The controller's registered output word (6 bits).
  typedef struct packed {
    logic        timer_on;
    interval_e   interval;
    light_mode_e light;
    logic        siren_on;
  } fsm_outputs_t;

  // Width of one time parameter (seconds).
  localparam int unsigned TIME_W = 4;

  // Factory default delays in seconds.
  localparam logic [TIME_W-1:0] T_ARM_DEFAULT       = 4'd6;
  localparam logic [TIME_W-1:0] T_DRIVER_DEFAULT    = 4'd8;
  localparam logic [TIME_W-1:0] T_PASSENGER_DEFAULT = 4'd15;
  localparam logic [TIME_W-1:0] T_ALARM_DEFAULT     = 4'd10;

  // System clock frequency of the reference build (Hz).
  localparam int unsigned SYS_CLK_HZ = 27_000_000;

endpackage
