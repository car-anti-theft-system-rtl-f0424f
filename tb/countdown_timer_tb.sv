// countdown_timer_tb: the timer against a tick source that, like the 1 Hz
// divider in the system, restarts on every start strobe. A count of V must
// expire exactly V*PERIOD+1 cycles after its start, as a one-cycle strobe;
// a start during a countdown restarts it.
module countdown_timer_tb;
  localparam int unsigned PERIOD = 6;
  logic clk = 1'b0, rst = 1'b1, tick, start = 1'b0, expired;
  logic [3:0] value = '0, count;
  int checks = 0, failures = 0, restarts = 0;

  countdown_timer dut (.clk(clk), .rst(rst), .tick(tick), .value(value),
                       .start(start), .expired(expired), .count(count));

  // Tick source restarted by start (as in the system).
  clock_divider #(.DIVISOR(PERIOD)) u_tick (.clk(clk), .rst(rst || start), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #400000;
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

  // Start a countdown of v; if abort_after >= 0, restart it with v2 after
  // that many cycles. Measure the cycles from the (last) start to expiry.
  task automatic run(input logic [3:0] v, input int abort_after, input logic [3:0] v2);
    int n, exp_n, strobes;
    logic [3:0] vv;
    @(negedge clk);
    value = v; start = 1'b1;
    vv = v;
    @(negedge clk);
    start = 1'b0;
    value = $urandom();  // value only matters in the start cycle
    n = 1;
    strobes = 0;
    if (abort_after >= 0) begin
      repeat (abort_after) begin
        #1;
        check(!expired, "expired before restart");
        @(negedge clk);
        n++;
      end
      value = v2; start = 1'b1; vv = v2;
      @(negedge clk);
      start = 1'b0;
      n = 1;
      restarts++;
    end
    exp_n = vv * PERIOD + 1;
    while (n <= exp_n + 3 * PERIOD) begin
      #1;
      if (expired) begin
        strobes++;
        check(n == exp_n, $sformatf("value %0d expired after %0d cycles, expected %0d", vv, n, exp_n));
      end
      // Displayed count: value minus whole periods elapsed.
      if (n < exp_n)
        check(count == vv - 4'((n - 1) / PERIOD), $sformatf("count %0d at cycle %0d of %0d", count, n, vv));
      @(negedge clk);
      n++;
    end
    check(strobes == 1, $sformatf("%0d expired strobes for value %0d", strobes, vv));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(!expired && count == 0, "idle after reset");
    run(4'd3, -1, 4'd0);
    run(4'd0, -1, 4'd0);
    run(4'd1, -1, 4'd0);
    run(4'd15, -1, 4'd0);
    run(4'd5, 13, 4'd2);   // restart in mid-count with a shorter value
    run(4'd2, 4, 4'd9);    // restart with a longer value
    for (int i = 0; i < 12; i++) run(4'($urandom_range(0, 15)), -1, 4'd0);
    check(restarts == 2, "restarts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
