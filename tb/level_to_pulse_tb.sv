// level_to_pulse_tb: random levels against an edge-detector reference.
// Checks one pulse per rising edge, none while the level stays high, and
// none for a level already high when reset ends.
module level_to_pulse_tb;
  logic clk = 1'b0, rst = 1'b1, level = 1'b0, pulse;
  int checks = 0, failures = 0;
  logic prev;  // reference: level in the previous cycle (1 under reset)
  int pulses = 0, rises = 0;

  level_to_pulse dut (.clk(clk), .rst(rst), .level(level), .pulse(pulse));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Level high across the end of reset: no pulse.
    level = 1'b1;
    repeat (3) @(negedge clk);
    rst  = 1'b0;
    prev = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i < 5) level = 1'b1;
      else if (i % 50 < 10) level = 1'b1;          // long high stretches
      else level = 1'($urandom_range(0, 1));
      #1;
      check(pulse, level && !prev, "pulse");
      if (level && !prev) rises++;
      if (pulse) pulses++;
      prev = level;
    end
    checks++;
    if (rises < 20 || pulses != rises) begin
      failures++;
      $display("FAIL too few edges or pulse count %0d vs %0d", pulses, rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
