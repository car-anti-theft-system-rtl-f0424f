// car_antitheft_top_tb: end-to-end scenarios on the whole system, with the
// clock scaled to CLK_HZ = 27 000 (one second = 27 000 cycles) and a
// 5-cycle debounce so the run is short. Raw switch inputs are driven; the
// state code, light, siren and pump outputs are observed. Each mechanism of
// the design is exercised and counted, and a mechanism never seen counts as
// a failure:
//   glitch      a door bounce shorter than the debounce time is ignored
//   driver      driver door starts an 8 s countdown, then the siren sounds
//   passenger   passenger door starts a 15 s countdown
//   rearm       with doors closed the siren stops after 10 s, system re-armed
//   reopen      a door opened during the re-arm wait sounds the siren again
//   disarm      the ignition disarms a running countdown
//   autoarm     driver leaves, doors close, system arms itself after 6 s
//   armwait_int a door opened during the arming wait restarts that wait
//   reprogram   a delay rewritten from the switches takes effect
//   user_reset  the reset button restores the default delays
//   blink       the armed light toggles once per second
//   pump_lock / pump_unlock  the hidden fuel-pump interlock
//   guest       passenger door opened first, driver door 5 s later and the
//               ignition at 9 s: the 15 s passenger countdown still runs,
//               so the owner gets in without the siren sounding
module car_antitheft_top_tb;
  localparam int unsigned CLK_HZ = 27000;
  localparam int unsigned DEB    = 5;
  localparam int unsigned TOL    = 40;   // cycles of input and pipeline latency

  // State codes.
  localparam int ARMED = 0, SOUND_ALARM = 5, REARM_TIME = 6, DISARMED = 7,
                 DOOR_WAIT_O = 8, DOOR_WAIT_C = 9, ARM_WAIT = 10,
                 DRIVER_TRIG = 4, PASSENGER_TRIG = 3;

  logic clk = 1'b0, por = 1'b1, reset_btn = 1'b0;
  logic brake = 1'b0, hidden = 1'b0, ignition = 1'b0, driver = 1'b0, passenger = 1'b0;
  logic reprogram = 1'b0;
  logic [1:0] parm_sel = '0;
  logic [3:0] time_val = '0;
  logic pump, light, siren;
  logic [3:0] fsm_state, timer_count;

  int checks = 0, failures = 0;
  int n_glitch = 0, n_driver = 0, n_passenger = 0, n_rearm = 0, n_reopen = 0,
      n_disarm = 0, n_autoarm = 0, n_armwait_int = 0, n_reprogram = 0,
      n_user_reset = 0, n_blink = 0, n_pump_lock = 0, n_pump_unlock = 0, n_guest = 0;

  car_antitheft_top #(.CLK_HZ(CLK_HZ), .DEBOUNCE_CYCLES(DEB)) dut (
    .clk(clk), .power_on_reset(por), .reset_btn(reset_btn),
    .brake_sw(brake), .hidden_sw(hidden), .ignition_sw(ignition),
    .driver_door(driver), .passenger_door(passenger), .reprogram_btn(reprogram),
    .parm_sel_sw(parm_sel), .time_val_sw(time_val),
    .fuel_pump_power(pump), .status_light(light), .siren_out(siren),
    .fsm_state(fsm_state), .timer_count(timer_count));

  always #5 clk = ~clk;

  // Watchdog: 400 simulated seconds.
  initial begin
    repeat (400 * CLK_HZ) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Wait until the state code equals s; return the cycles waited.
  task automatic wait_state(input int s, input int limit, output int n);
    n = 0;
    while (int'(fsm_state) != s && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(int'(fsm_state) == s, $sformatf("state %0d not reached (in %0d)", s, fsm_state));
  endtask

  // Count siren output edges over n cycles.
  task automatic siren_edges(input int n, output int edges);
    logic prev;
    edges = 0;
    prev = siren;
    repeat (n) begin
      @(negedge clk);
      if (siren != prev) edges++;
      prev = siren;
    end
  endtask

  // Open a door, expect the countdown of `secs`, then the siren.
  task automatic trigger(input bit use_driver, input int secs, output bit ok);
    int n, e;
    @(negedge clk);
    if (use_driver) driver = 1'b1; else passenger = 1'b1;
    wait_state(use_driver ? DRIVER_TRIG : PASSENGER_TRIG, TOL, n);
    cycles(10);
    check(light == 1'b1, "light steady on during countdown");
    siren_edges(CLK_HZ / 4, e);
    check(e == 0, "siren quiet during countdown");
    wait_state(SOUND_ALARM, secs * CLK_HZ + TOL, n);
    n = n + 10 + CLK_HZ / 4 + 2;   // cycles since the TRIG state was seen
    ok = (n >= secs * CLK_HZ - 2) && (n <= secs * CLK_HZ + TOL);
    check(ok, $sformatf("countdown %0d cycles, expected %0d s", n, secs));
    siren_edges(CLK_HZ / 10, e);
    check(e > 50, $sformatf("siren sounding (%0d edges)", e));
    check(light == 1'b1, "light on while siren sounds");
  endtask

  initial begin
    int n, e;
    bit ok;
    logic prev;

    cycles(20);
    por = 1'b0;
    cycles(2 * DEB + 20);
    check(int'(fsm_state) == ARMED, "armed after power-on reset");
    check(pump == 1'b0 && siren == 1'b0, "outputs idle after reset");

    // Blink: toggles once per second in the armed state.
    begin
      int last = -1, toggles = 0, good = 0;
      prev = light;
      for (int i = 1; i <= 4 * CLK_HZ; i++) begin
        @(negedge clk);
        if (light != prev) begin
          if (last >= 0 && i - last == CLK_HZ) good++;
          last = i;
          toggles++;
        end
        prev = light;
      end
      check(toggles >= 3 && good >= 2, $sformatf("blink: %0d toggles, %0d exact", toggles, good));
      if (good >= 2) n_blink++;
    end

    // Glitch: a 2-cycle bounce on the driver door changes nothing.
    @(negedge clk); driver = 1'b1; cycles(2); driver = 1'b0;
    cycles(3 * DEB + 20);
    check(int'(fsm_state) == ARMED, "glitch ignored");
    if (int'(fsm_state) == ARMED) n_glitch++;

    // Driver door: 8 s countdown, siren.
    trigger(1'b1, 8, ok);
    if (ok) n_driver++;
    // Close: re-arm wait of 10 s with the siren still on.
    @(negedge clk); driver = 1'b0;
    wait_state(REARM_TIME, TOL, n);
    cycles(3 * CLK_HZ);
    siren_edges(CLK_HZ / 10, e);
    check(e > 50, "siren sounds during the re-arm wait");
    // Re-open during the wait: back to the alarm.
    @(negedge clk); passenger = 1'b1;
    wait_state(SOUND_ALARM, TOL, n);
    if (int'(fsm_state) == SOUND_ALARM) n_reopen++;
    cycles(CLK_HZ);
    @(negedge clk); passenger = 1'b0;
    wait_state(REARM_TIME, TOL, n);
    wait_state(ARMED, 10 * CLK_HZ + TOL, n);
    check(n >= 10 * CLK_HZ - TOL && n <= 10 * CLK_HZ + TOL, $sformatf("re-arm after %0d cycles", n));
    if (n >= 10 * CLK_HZ - TOL && n <= 10 * CLK_HZ + TOL) n_rearm++;
    cycles(CLK_HZ / 5);
    siren_edges(CLK_HZ / 10, e);
    check(e == 0 && siren == 1'b0, "siren off after re-arm");

    // Passenger door: 15 s countdown, then the owner switches on the ignition.
    trigger(1'b0, 15, ok);
    if (ok) n_passenger++;
    @(negedge clk); ignition = 1'b1;
    wait_state(DISARMED, TOL, n);
    cycles(10);
    check(light == 1'b0 && siren == 1'b0, "disarmed: light and siren off");

    // Fuel pump: brake + hidden held before the ignition does not count when
    // the ignition is off; with the ignition on, pressing both unlocks.
    @(negedge clk); ignition = 1'b0; passenger = 1'b0;
    cycles(3 * DEB + 20);
    @(negedge clk); brake = 1'b1; hidden = 1'b1;
    cycles(3 * DEB + 20);
    check(pump == 1'b0, "pump locked without ignition");
    @(negedge clk); brake = 1'b0; hidden = 1'b0;
    cycles(3 * DEB + 20);
    @(negedge clk); ignition = 1'b1;
    cycles(3 * DEB + 20);
    @(negedge clk); brake = 1'b1;
    cycles(3 * DEB + 20);
    check(pump == 1'b0, "pump locked with brake only");
    if (pump == 1'b0) n_pump_lock++;
    @(negedge clk); brake = 1'b0; hidden = 1'b1;
    cycles(3 * DEB + 20);
    check(pump == 1'b0, "pump locked with hidden switch only");
    @(negedge clk); brake = 1'b1;
    cycles(3 * DEB + 20);
    check(pump == 1'b1, "pump unlocked by brake and hidden switch together");
    @(negedge clk); brake = 1'b0; hidden = 1'b0;
    cycles(3 * DEB + 20);
    check(pump == 1'b1, "pump stays on after release");
    if (pump == 1'b1) n_pump_unlock++;

    // Disarm a countdown with the ignition: arm first via reprogram.
    check(int'(fsm_state) == DISARMED, "disarmed while driving");
    @(negedge clk); ignition = 1'b0;
    wait_state(DOOR_WAIT_O, TOL, n);
    check(pump == 1'b0, "pump off with ignition off");
    // Owner leaves: driver door open, close, arming wait.
    @(negedge clk); driver = 1'b1;
    wait_state(DOOR_WAIT_C, TOL, n);
    @(negedge clk); driver = 1'b0;
    wait_state(ARM_WAIT, TOL, n);
    cycles(3 * CLK_HZ);
    // Passenger door during the wait restarts it.
    @(negedge clk); passenger = 1'b1;
    wait_state(DOOR_WAIT_C, TOL, n);
    if (int'(fsm_state) == DOOR_WAIT_C) n_armwait_int++;
    cycles(CLK_HZ / 2);
    @(negedge clk); passenger = 1'b0;
    wait_state(ARM_WAIT, TOL, n);
    wait_state(ARMED, 6 * CLK_HZ + TOL, n);
    check(n >= 6 * CLK_HZ - TOL && n <= 6 * CLK_HZ + TOL, $sformatf("auto-arm after %0d cycles", n));
    if (n >= 6 * CLK_HZ - TOL && n <= 6 * CLK_HZ + TOL) n_autoarm++;

    // Ignition during a driver countdown disarms it.
    @(negedge clk); driver = 1'b1;
    wait_state(DRIVER_TRIG, TOL, n);
    cycles(2 * CLK_HZ);
    @(negedge clk); ignition = 1'b1;
    wait_state(DISARMED, TOL, n);
    if (int'(fsm_state) == DISARMED) n_disarm++;
    cycles(10 * CLK_HZ);
    check(int'(fsm_state) == DISARMED && siren == 1'b0, "stays disarmed, no siren");
    @(negedge clk); ignition = 1'b0; driver = 1'b0;
    cycles(3 * DEB + 20);

    // Reprogram the driver delay to 3 s; reprogram also arms the system.
    @(negedge clk); parm_sel = 2'b01; time_val = 4'd3;
    cycles(3 * DEB + 20);
    @(negedge clk); reprogram = 1'b1;
    cycles(3 * DEB + 20);
    @(negedge clk); reprogram = 1'b0;
    wait_state(ARMED, TOL, n);
    cycles(3 * DEB + 20);
    trigger(1'b1, 3, ok);
    if (ok) n_reprogram++;
    @(negedge clk); driver = 1'b0;
    wait_state(ARMED, 10 * CLK_HZ + 2 * TOL, n);

    // User reset restores the 8 s default.
    @(negedge clk); reset_btn = 1'b1;
    cycles(3 * DEB + 20);
    @(negedge clk); reset_btn = 1'b0;
    cycles(3 * DEB + 20);
    check(int'(fsm_state) == ARMED, "armed after user reset");
    trigger(1'b1, 8, ok);
    if (ok) n_user_reset++;

    // Guest: passenger door first, driver door 5 s later, ignition at 9 s.
    @(negedge clk); driver = 1'b0;
    wait_state(REARM_TIME, TOL, n);
    wait_state(ARMED, 10 * CLK_HZ + TOL, n);
    cycles(CLK_HZ / 2);
    @(negedge clk); passenger = 1'b1;
    wait_state(PASSENGER_TRIG, TOL, n);
    cycles(5 * CLK_HZ);
    @(negedge clk); driver = 1'b1;
    cycles(4 * CLK_HZ);
    check(int'(fsm_state) == PASSENGER_TRIG, "driver door does not shorten the passenger countdown");
    @(negedge clk); ignition = 1'b1;
    siren_edges(CLK_HZ, e);
    check(e == 0, "no siren for the guest scenario");
    check(int'(fsm_state) == DISARMED, "guest scenario ends disarmed");
    if (e == 0 && int'(fsm_state) == DISARMED) n_guest++;

    check(n_glitch > 0, "mechanism glitch never happened");
    check(n_guest > 0, "mechanism guest never happened");
    check(n_driver > 0, "mechanism driver never happened");
    check(n_passenger > 0, "mechanism passenger never happened");
    check(n_rearm > 0, "mechanism rearm never happened");
    check(n_reopen > 0, "mechanism reopen never happened");
    check(n_disarm > 0, "mechanism disarm never happened");
    check(n_autoarm > 0, "mechanism autoarm never happened");
    check(n_armwait_int > 0, "mechanism armwait_int never happened");
    check(n_reprogram > 0, "mechanism reprogram never happened");
    check(n_user_reset > 0, "mechanism user_reset never happened");
    check(n_blink > 0, "mechanism blink never happened");
    check(n_pump_lock > 0, "mechanism pump_lock never happened");
    check(n_pump_unlock > 0, "mechanism pump_unlock never happened");
    $display("mechanisms: glitch=%0d driver=%0d passenger=%0d rearm=%0d reopen=%0d disarm=%0d autoarm=%0d armwait_int=%0d reprogram=%0d user_reset=%0d blink=%0d pump_lock=%0d pump_unlock=%0d guest=%0d",
             n_glitch, n_driver, n_passenger, n_rearm, n_reopen, n_disarm, n_autoarm,
             n_armwait_int, n_reprogram, n_user_reset, n_blink, n_pump_lock, n_pump_unlock, n_guest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
