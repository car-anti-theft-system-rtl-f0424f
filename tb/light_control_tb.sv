// light_control_tb: off and on modes follow immediately; blink mode toggles
// every BLINK_DIVISOR cycles, the first toggle BLINK_DIVISOR+1 cycles after
// blinking starts, and a return to blinking restarts that phase.
module light_control_tb;
  import antitheft_pkg::*;
  localparam int unsigned DIV = 9;
  logic clk = 1'b0, rst = 1'b1, light;
  light_mode_e mode = LIGHT_OFF;
  int checks = 0, failures = 0;

  light_control #(.BLINK_DIVISOR(DIV)) dut (.clk(clk), .rst(rst), .mode(mode), .light(light));

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  // Enter blink mode, then watch `cycles` cycles; the light must hold its
  // starting level until cycle DIV+1 and toggle every DIV cycles after.
  task automatic blink_for(input int cycles);
    logic start_level, expect_level;
    @(negedge clk);
    start_level = light;
    mode = LIGHT_BLINK;
    for (int n = 1; n <= cycles; n++) begin
      @(negedge clk);
      expect_level = start_level ^ 1'(((n - 1) / DIV) % 2);
      check(light == expect_level, $sformatf("blink cycle %0d light %0b", n, light));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(light == 1'b0, "off after reset");
    mode = LIGHT_ON;
    @(negedge clk); @(negedge clk);
    check(light == 1'b1, "on mode");
    mode = LIGHT_OFF;
    @(negedge clk); @(negedge clk);
    check(light == 1'b0, "off mode");
    blink_for(6 * DIV + 3);
    mode = LIGHT_ON;
    @(negedge clk); @(negedge clk);
    check(light == 1'b1, "on mode after blink");
    blink_for(4 * DIV + 5);
    mode = LIGHT_OFF;
    repeat (3) @(negedge clk);
    check(light == 1'b0, "off mode after blink");
    for (int i = 0; i < 3 * DIV; i++) begin
      @(negedge clk);
      check(light == 1'b0, "off holds");
    end
    blink_for(3 * DIV + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
