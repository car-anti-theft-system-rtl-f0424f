// car_antitheft_full_tb: one complete alarm cycle on the system at its
// default parameters (27 MHz clock, 10 ms debounce, 1 s = 27 000 000
// cycles). Armed light blinks with a one-second half-period; the driver door
// opens, the siren starts 8 s later; the door closes and 10 s later the
// siren stops and the system is armed again. The testbench waits on events
// and measures intervals with simulation time: it sleeps with plain delays
// until shortly before each expected event and only then watches the
// outputs. It simulates about 21 s of operation (~570 million clock cycles).
module car_antitheft_full_tb;
  localparam longint CLK_HZ   = 27_000_000;
  localparam longint PERIOD   = 10;                  // ns per cycle in this testbench
  localparam longint SEC      = CLK_HZ * PERIOD;     // one second of design time, ns
  localparam longint TOL      = 400_000 * PERIOD;    // debounce plus pipeline latency
  localparam longint EARLY    = 27_000 * PERIOD;     // start watching 1 ms early

  logic clk = 1'b0, por = 1'b1;
  logic driver = 1'b0;
  logic pump, light, siren;
  logic [3:0] fsm_state, timer_count;
  int checks = 0, failures = 0;

  car_antitheft_top dut (
    .clk(clk), .power_on_reset(por), .reset_btn(1'b0),
    .brake_sw(1'b0), .hidden_sw(1'b0), .ignition_sw(1'b0),
    .driver_door(driver), .passenger_door(1'b0), .reprogram_btn(1'b0),
    .parm_sel_sw(2'b00), .time_val_sw(4'd0),
    .fuel_pump_power(pump), .status_light(light), .siren_out(siren),
    .fsm_state(fsm_state), .timer_count(timer_count));

  always #5 clk = ~clk;

  initial begin
    #(64'd30_000_000_000);   // 30 s of design time
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

  // Sleep until `at` - EARLY, check the state is not yet s, then wait for it.
  task automatic wait_state_at(input logic [3:0] s, input longint at);
    longint now;
    now = $time;
    if (at - EARLY > now) #(at - EARLY - now);
    check(fsm_state != s, $sformatf("state %0d reached early", s));
    while (fsm_state != s) @(fsm_state);
  endtask

  initial begin
    longint t0, t1, dt;
    repeat (20) @(negedge clk);
    por = 1'b0;
    repeat (100) @(negedge clk);
    check(fsm_state == 4'd0 && siren == 1'b0 && pump == 1'b0, "armed and quiet after reset");

    // Armed light: toggles once per second.
    #(SEC - EARLY - 120 * PERIOD);
    @(light); t0 = $time;
    #(SEC - EARLY);
    @(light); t1 = $time;
    dt = t1 - t0;
    check(dt == SEC, $sformatf("blink half-period %0d ns, expected %0d", dt, SEC));

    // Driver door opens: siren after 8 s.
    @(negedge clk); driver = 1'b1; t0 = $time;
    while (fsm_state != 4'd4) @(fsm_state);
    #(SEC / 2);
    check(light == 1'b1 && siren == 1'b0, "light on and siren quiet during countdown");
    wait_state_at(4'd5, t0 + 8 * SEC);
    dt = $time - t0;
    check(dt >= 8 * SEC && dt <= 8 * SEC + TOL, $sformatf("alarm after %0d ns, expected 8 s", dt));
    // Siren tone: first half-periods at the middle frequency (500 Hz).
    @(siren); t0 = $time;
    @(siren); t1 = $time;
    dt = (t1 - t0) / PERIOD;
    // Middle frequency (divisor 27000), already sweeping up by one step
    // every 4000 cycles.
    check(dt >= 27000 - 20 && dt <= 27000, $sformatf("first siren half-period %0d cycles", dt));
    #(SEC);
    @(siren); t0 = $time;
    @(siren); t1 = $time;
    dt = (t1 - t0) / PERIOD;
    check(dt >= 20239 && dt <= 33751, $sformatf("siren half-period %0d cycles out of range", dt));

    // Door closes: re-armed 10 s later, siren silent.
    @(negedge clk); driver = 1'b0; t0 = $time;
    while (fsm_state != 4'd6) @(fsm_state);
    wait_state_at(4'd0, t0 + 10 * SEC);
    dt = $time - t0;
    check(dt >= 10 * SEC && dt <= 10 * SEC + TOL, $sformatf("re-armed after %0d ns, expected 10 s", dt));
    repeat (10) @(negedge clk);
    check(siren == 1'b0, "siren silent after re-arm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
