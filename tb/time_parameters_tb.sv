// time_parameters_tb: factory defaults after reset, one-cycle registered
// read, and random reprogramming against a reference copy of the store.
module time_parameters_tb;
  import antitheft_pkg::*;
  logic clk = 1'b0, rst = 1'b1, reprogram = 1'b0;
  interval_e parm_sel = SEL_ARM, interval = SEL_ARM;
  logic [3:0] time_val = '0, value;
  int checks = 0, failures = 0, writes = 0;
  logic [3:0] ref_params [4];
  logic [3:0] ref_value;

  time_parameters dut (.clk(clk), .rst(rst), .reprogram(reprogram), .parm_sel(parm_sel),
                       .time_val(time_val), .interval(interval), .value(value));

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  // One cycle: apply inputs, compare value, advance the reference.
  task automatic step(input interval_e iv, input logic rp, input interval_e ps, input logic [3:0] tv);
    @(negedge clk);
    interval = iv; reprogram = rp; parm_sel = ps; time_val = tv;
    #1;
    check(value == ref_value, $sformatf("value %0d expected %0d", value, ref_value));
    ref_value = ref_params[iv];
    if (rp) begin ref_params[ps] = tv; writes++; end
  endtask

  initial begin
    // Table of factory defaults: 6, 8, 15, 10 seconds.
    ref_params[0] = 4'd6; ref_params[1] = 4'd8; ref_params[2] = 4'd15; ref_params[3] = 4'd10;
    ref_value = 4'd6;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Read back each default.
    for (int i = 0; i < 4; i++) step(interval_e'(i), 1'b0, SEL_ARM, 4'd0);
    step(SEL_ARM, 1'b0, SEL_ARM, 4'd0);
    // Reprogram all four, read back.
    for (int i = 0; i < 4; i++) step(SEL_ARM, 1'b1, interval_e'(i), 4'(3 + i));
    for (int i = 0; i < 4; i++) step(interval_e'(i), 1'b0, SEL_ARM, 4'd0);
    step(SEL_ALARM, 1'b0, SEL_ARM, 4'd0);
    check(value == 4'd6, "reprogrammed alarm time read back");
    // Random traffic.
    for (int i = 0; i < 2000; i++)
      step(interval_e'($urandom_range(0, 3)), ($urandom_range(0, 4) == 0),
           interval_e'($urandom_range(0, 3)), 4'($urandom_range(0, 15)));
    // Reset restores the defaults.
    @(negedge clk);
    interval = SEL_ARM;
    reprogram = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    ref_params[0] = 4'd6; ref_params[1] = 4'd8; ref_params[2] = 4'd15; ref_params[3] = 4'd10;
    ref_value = 4'd6;
    for (int i = 0; i < 4; i++) step(interval_e'(i), 1'b0, SEL_ARM, 4'd0);
    step(SEL_ARM, 1'b0, SEL_ARM, 4'd0);
    check(writes > 300, "reprogram writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
