// clock_divider_tb: ticks every DIVISOR cycles, first tick DIVISOR cycles
// after a restart, and a restart in mid-count realigns the ticks.
module clock_divider_tb;
  localparam int unsigned DIVISOR = 7;
  logic clk = 1'b0, rst = 1'b1, tick;
  int checks = 0, failures = 0;
  int since_rst;  // cycles since the last cycle with rst high

  clock_divider #(.DIVISOR(DIVISOR)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks = 0;
    repeat (2) @(negedge clk);
    since_rst = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rst = ($urandom_range(0, 60) == 0);
      #1;
      checks++;
      // Expected: tick when a whole number of periods has passed since the
      // last restart, never in a restart cycle.
      if (tick !== (!rst && since_rst > 0 && since_rst % DIVISOR == 0)) begin
        failures++;
        $display("FAIL tick=%0b rst=%0b since_rst=%0d at %0t", tick, rst, since_rst, $time);
      end
      if (tick) ticks++;
      since_rst = rst ? 1 : since_rst + 1;
    end
    checks++;
    if (ticks < 100) begin failures++; $display("FAIL only %0d ticks", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
