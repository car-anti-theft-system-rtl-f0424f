// fuel_pump_logic_tb: directed unlock sequences plus random switch activity
// against a reference of the unlock rule (ignition on, then brake and hidden
// switch together; latched until the ignition goes off).
module fuel_pump_logic_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic ignition = 1'b0, brake = 1'b0, hidden = 1'b0, pump;
  int checks = 0, failures = 0, unlocks = 0;

  // Reference: 0 locked, 1 ignition seen, 2 unlocked.
  int ref_state = 0;

  fuel_pump_logic dut (.clk(clk), .rst(rst), .ignition(ignition), .brake(brake),
                       .hidden(hidden), .pump(pump));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply inputs for one cycle, check pump before the edge, advance reference.
  task automatic step(input logic ig, input logic br, input logic hd);
    @(negedge clk);
    ignition = ig; brake = br; hidden = hd;
    #1;
    checks++;
    if (pump !== (ref_state == 2)) begin
      failures++;
      $display("FAIL pump=%0b reference state %0d at %0t", pump, ref_state, $time);
    end
    case (ref_state)
      0: if (ig) ref_state = 1;
      1: if (!ig) ref_state = 0; else if (br && hd) begin ref_state = 2; unlocks++; end
      default: if (!ig) ref_state = 0;
    endcase
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Brake and hidden switch without the ignition: must stay locked.
    step(0, 1, 1); step(0, 1, 1); step(0, 1, 1); step(1, 0, 0);
    checks++;
    if (pump) begin failures++; $display("FAIL unlocked with switches held before ignition"); end
    // Release, press them one at a time: still locked.
    step(1, 0, 0); step(1, 1, 0); step(1, 0, 1); step(1, 0, 0);
    checks++;
    if (pump) begin failures++; $display("FAIL unlocked without both switches"); end
    // Both together: unlock, then releasing them keeps it on.
    step(1, 1, 1); step(1, 0, 0); step(1, 0, 0);
    checks++;
    if (!pump) begin failures++; $display("FAIL not unlocked by the right sequence"); end
    // Ignition off locks again.
    step(0, 0, 0); step(0, 0, 0);
    checks++;
    if (pump) begin failures++; $display("FAIL still on after ignition off"); end
    // Random activity.
    for (int i = 0; i < 3000; i++)
      step(($urandom_range(0, 9) != 0), ($urandom_range(0, 3) == 0), ($urandom_range(0, 3) == 0));
    checks++;
    if (unlocks < 5) begin failures++; $display("FAIL only %0d unlocks exercised", unlocks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
