// debouncer_tb: glitches shorter than DELAY never reach the output; a stable
// change reaches it exactly DELAY+4 cycles after the input moved.
module debouncer_tb;
  localparam int unsigned DELAY = 20;
  logic clk = 1'b0, rst = 1'b1, noisy = 1'b0, clean;
  int checks = 0, failures = 0;

  debouncer #(.DELAY(DELAY)) dut (.clk(clk), .rst(rst), .noisy(noisy), .clean(clean));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive a new stable level and measure the cycles until clean follows.
  task automatic settle_to(input logic v);
    int n;
    @(negedge clk);
    noisy = v;
    n = 0;
    while (clean !== v && n < 10 * DELAY) begin
      @(posedge clk);
      n++;
      #1;
    end
    check(n == DELAY + 4, $sformatf("latency %0d, expected %0d", n, DELAY + 4));
  endtask

  // A glitch of len cycles, then back to base; clean must never move.
  task automatic glitch(input logic base, input int len);
    @(negedge clk);
    noisy = ~base;
    repeat (len) begin
      @(negedge clk);
      check(clean === base, "glitch passed through");
    end
    noisy = base;
    repeat (DELAY + 6) begin
      @(negedge clk);
      check(clean === base, "glitch passed through after release");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(clean === 1'b0, "reset value");
    for (int i = 0; i < 10; i++) glitch(1'b0, $urandom_range(1, DELAY));
    settle_to(1'b1);
    for (int i = 0; i < 10; i++) glitch(1'b1, $urandom_range(1, DELAY));
    // Bouncing: random toggles, then settle low.
    @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      noisy = 1'($urandom_range(0, 1));
      check(clean === 1'b1, "bounce passed through");
    end
    settle_to(1'b0);
    settle_to(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
