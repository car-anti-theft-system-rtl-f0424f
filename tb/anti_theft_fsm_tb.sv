// anti_theft_fsm_tb: the alarm controller against a reference transition
// table (eleven states, ignition first), with random door, ignition,
// reprogram and expired activity. Each cycle it checks the state, and one
// cycle behind it the interval, siren enable and start strobe, and two
// cycles behind it the steady light levels. A directed part checks the
// blink period in the armed state and the interval set-up before every
// timer start. Every state must be visited.
module anti_theft_fsm_tb;
  import antitheft_pkg::*;
  localparam int unsigned BLINK = 12;

  logic clk = 1'b0, rst = 1'b1;
  logic ignition = 1'b0, driver = 1'b0, passenger = 1'b0, reprogram = 1'b0, expired = 1'b0;
  interval_e  interval;
  logic       start_timer, light, siren_en;
  fsm_state_e state;
  int checks = 0, failures = 0;
  int visits [11];
  int starts = 0;

  anti_theft_fsm #(.BLINK_DIVISOR(BLINK)) dut (
    .clk(clk), .rst(rst), .ignition(ignition), .driver(driver), .passenger(passenger),
    .reprogram(reprogram), .expired(expired), .interval(interval),
    .start_timer(start_timer), .light(light), .siren_en(siren_en), .state(state));

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  // Reference: per-state flags {timer_on, interval, light 0/1/2, siren}.
  function automatic int ref_timer(int s);  return (s == 3 || s == 4 || s == 6 || s == 10); endfunction
  function automatic int ref_siren(int s);  return (s == 5 || s == 6); endfunction
  function automatic int ref_interval(int s);
    case (s)
      1, 3:    return 2;
      2, 4:    return 1;
      5, 6:    return 3;
      default: return 0;
    endcase
  endfunction
  function automatic int ref_light(int s);  // 0 off, 1 on, 2 blink
    if (s <= 2) return 2;
    if (s <= 6) return 1;
    return 0;
  endfunction

  function automatic int ref_next(int s, bit ig, bit dr, bit ps, bit ex);
    case (s)
      0:  return ig ? 7 : dr ? 2 : ps ? 1 : 0;
      1:  return 3;
      2:  return 4;
      3, 4: return ig ? 7 : ex ? 5 : s;
      5:  return ig ? 7 : (!dr && !ps) ? 6 : 5;
      6:  return ig ? 7 : (dr || ps) ? 5 : ex ? 0 : 6;
      7:  return !ig ? 8 : 7;
      8:  return ig ? 7 : dr ? 9 : 8;
      9:  return ig ? 7 : (!dr && !ps) ? 10 : 9;
      10: return ig ? 7 : (dr || ps) ? 9 : ex ? 0 : 10;
      default: return 0;
    endcase
  endfunction

  int s0, s1, s2;  // reference state now, one and two cycles ago

  task automatic step(input bit ig, input bit dr, input bit ps, input bit rp, input bit ex);
    @(negedge clk);
    ignition = ig; driver = dr; passenger = ps; reprogram = rp; expired = ex;
    #1;
    check(int'(state) == s0, $sformatf("state %0d expected %0d", state, s0));
    check(int'(interval) == ref_interval(s1), $sformatf("interval %0d in state %0d", interval, s1));
    check(int'(siren_en) == ref_siren(s1), $sformatf("siren %0b after state %0d", siren_en, s1));
    check(int'(start_timer) == (ref_timer(s1) && !ref_timer(s2)),
          $sformatf("start_timer %0b after states %0d,%0d", start_timer, s2, s1));
    if (ref_light(s2) == 1 && ref_light(s1) == 1) check(light == 1'b1, "light on");
    if (ref_light(s2) == 0 && ref_light(s1) == 0) check(light == 1'b0, "light off");
    if (start_timer) starts++;
    visits[s0]++;
    s2 = s1;
    s1 = s0;
    s0 = rp ? 0 : ref_next(s0, ig, dr, ps, ex);
  endtask

  initial begin
    bit ig, dr, ps;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    s0 = 0; s1 = 0; s2 = 0;
    // Armed and idle: light blinks with a toggle every BLINK cycles.
    begin
      int toggles = 0, last = -1, n = 0;
      logic prev = light;
      repeat (6 * BLINK + 2) begin
        step(0, 0, 0, 0, 0);
        n++;
        if (light != prev) begin
          if (last >= 0) check(n - last == BLINK, $sformatf("blink half-period %0d", n - last));
          last = n;
          toggles++;
        end
        prev = light;
      end
      check(toggles >= 5, "armed light blinks");
    end
    // Directed: driver door, countdown, alarm, close, re-open, close, re-arm.
    step(0, 1, 0, 0, 0); step(0, 1, 0, 0, 0); step(0, 1, 0, 0, 0); step(0, 1, 0, 0, 0);
    step(0, 1, 0, 0, 1); step(0, 1, 0, 0, 0); step(0, 1, 0, 0, 0);
    step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0);
    step(0, 0, 1, 0, 0); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0);
    step(0, 0, 0, 0, 1); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0);
    check(s0 == 0, "directed alarm cycle returns to armed");
    // Directed: owner drives off and returns.
    step(1, 0, 0, 0, 0); step(1, 0, 0, 0, 0); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0);
    step(0, 1, 0, 0, 0); step(0, 1, 1, 0, 0); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0);
    step(0, 0, 1, 0, 0); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0);
    step(0, 0, 0, 0, 1); step(0, 0, 0, 0, 0); step(0, 0, 0, 0, 0);
    check(s0 == 0, "directed drive cycle returns to armed");
    // Random walk.
    ig = 0; dr = 0; ps = 0;
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(0, 29) == 0) ig = !ig;
      if ($urandom_range(0, 9) == 0)  dr = !dr;
      if ($urandom_range(0, 9) == 0)  ps = !ps;
      step(ig, dr, ps, ($urandom_range(0, 199) == 0), ($urandom_range(0, 7) == 0));
    end
    for (int s = 0; s < 11; s++) check(visits[s] > 0, $sformatf("state %0d never visited", s));
    check(starts > 100, "timer starts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
