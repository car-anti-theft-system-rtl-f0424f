// var_clock_divider_tb: with a fixed divisor D the tick period is exactly D
// and the first tick comes D+1 cycles after reset; when the divisor drops
// below the running count the divider wraps on the next cycle instead of
// running through its whole range.
module var_clock_divider_tb;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst = 1'b1, tick;
  logic [W-1:0] divisor = 8'd10;
  int checks = 0, failures = 0;

  var_clock_divider #(.W(W)) dut (.clk(clk), .rst(rst), .divisor(divisor), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #300000;
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

  // Cycles until the next tick (the current cycle counts as 1).
  task automatic wait_tick(output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
      #1;
    end while (!tick && n < 1000);
  endtask

  initial begin
    int n;
    // Reset with divisor 10: first tick 11 cycles after the reset cycle.
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    #1;
    n = 1;
    while (!tick && n < 100) begin @(negedge clk); n++; #1; end
    check(n == 11, $sformatf("first tick after %0d cycles, expected 11", n));
    // Fixed divisors: exact period.
    for (int d = 1; d <= 20; d++) begin
      divisor = 8'(d);
      wait_tick(n);                 // align (period may be mixed)
      for (int k = 0; k < 4; k++) begin
        wait_tick(n);
        check(n == d, $sformatf("divisor %0d period %0d", d, n));
      end
    end
    // Divisor dropped below the running count: next tick within 2 cycles.
    for (int k = 0; k < 20; k++) begin
      divisor = 8'd200;
      wait_tick(n);
      repeat ($urandom_range(50, 150)) @(negedge clk);
      divisor = 8'($urandom_range(2, 20));
      wait_tick(n);
      check(n <= 2, $sformatf("after divisor drop, tick after %0d cycles", n));
      wait_tick(n);
      check(n == int'(divisor), $sformatf("period after drop %0d, divisor %0d", n, divisor));
    end
    // Divisor 0 behaves as 1.
    divisor = 8'd0;
    wait_tick(n);
    wait_tick(n);
    check(n == 1, "divisor 0 ticks every cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
