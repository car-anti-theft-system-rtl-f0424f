// siren_generator_tb: measures the half-periods of the siren square wave.
// With CLK_HZ = 27000 the tone divisors are 27 (middle), 20 (high) and 33
// (low) cycles per half-period, and the sweep clock moves the divisor by one
// every 100 cycles. The test checks: silence while disabled; a restart at
// the middle frequency on enable; half-periods always within the high/low
// range; a rising-pitch phase ending at the high frequency and jumping to the
// middle, alternating with a falling-pitch phase ending at the low frequency;
// and the duration of a full up-down cycle.
module siren_generator_tb;
  localparam int unsigned CLK_HZ   = 27000;
  localparam int unsigned SWEEP_HZ = 270;
  localparam int unsigned MID_DIV  = CLK_HZ / (2 * 500);   // 27
  localparam int unsigned HIGH_DIV = CLK_HZ / (2 * 667);   // 20
  localparam int unsigned LOW_DIV  = CLK_HZ / (2 * 400);   // 33
  localparam int unsigned SWEEP_DIV = CLK_HZ / SWEEP_HZ;   // 100
  localparam int unsigned CYCLE_LEN = (MID_DIV - HIGH_DIV + LOW_DIV - MID_DIV) * SWEEP_DIV;

  logic clk = 1'b0, rst = 1'b1, siren_en = 1'b0, siren_out;
  int checks = 0, failures = 0;

  siren_generator #(.CLK_HZ(CLK_HZ), .SWEEP_HZ(SWEEP_HZ)) dut (
    .clk(clk), .rst(rst), .siren_en(siren_en), .siren_out(siren_out));

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

  // Collect nhalf half-period lengths of the enabled output and check them.
  task automatic observe(input int nhalf, input bit fresh_enable);
    int hp, prev_hp, len, cyc, tops, bottoms, last_top;
    logic prev_out;
    bit rising;
    prev_out = siren_out;
    len = 0; prev_hp = 0; tops = 0; bottoms = 0; last_top = -1; cyc = 0;
    rising = 1'b1;
    for (int k = 0; k < nhalf; ) begin
      @(negedge clk);
      cyc++;
      len++;
      if (siren_out != prev_out) begin
        hp = len;
        len = 0;
        prev_out = siren_out;
        if (k == 0 && fresh_enable)
          check(hp >= MID_DIV && hp <= MID_DIV + 3, $sformatf("first half-period %0d not at middle", hp));
        if (k > 0) begin
          // A half-period in which the divisor jumps back to the middle also
          // contains the restart of the tone divider, so it can be up to one
          // middle half-period longer than its neighbours.
          if (rising && prev_hp <= HIGH_DIV + 1 && hp >= MID_DIV - 1) begin
            // Top of the rising phase: jump back to the middle.
            check(hp <= prev_hp + MID_DIV + 2, $sformatf("jump half-period %0d too long", hp));
            rising = 1'b0;
            tops++;
            if (last_top >= 0)
              check(cyc - last_top >= CYCLE_LEN - 3 * SWEEP_DIV && cyc - last_top <= CYCLE_LEN + 3 * SWEEP_DIV,
                    $sformatf("up-down cycle took %0d cycles, expected about %0d", cyc - last_top, CYCLE_LEN));
            last_top = cyc;
          end else if (!rising && prev_hp >= LOW_DIV - 1 && prev_hp <= LOW_DIV + 2 &&
                       (hp <= MID_DIV + 1 || hp > LOW_DIV + 2)) begin
            // Bottom of the falling phase: jump back to the middle.
            check(hp <= prev_hp + MID_DIV + 2, $sformatf("jump half-period %0d too long", hp));
            rising = 1'b1;
            bottoms++;
          end else begin
            check(hp >= HIGH_DIV && hp <= LOW_DIV + 2, $sformatf("half-period %0d out of range", hp));
            if (rising)
              check(hp <= prev_hp + 1 || prev_hp > LOW_DIV + 2,
                    $sformatf("pitch fell while rising: %0d after %0d", hp, prev_hp));
            else
              check(hp + 1 >= prev_hp || prev_hp > LOW_DIV + 2,
                    $sformatf("pitch rose while falling: %0d after %0d", hp, prev_hp));
          end
        end
        if ($test$plusargs("trace")) $display("hp %0d rising %0b", hp, rising);
        prev_hp = hp;
        k++;
      end
    end
    check(tops >= 2 && bottoms >= 2, $sformatf("sweep phases seen: %0d up, %0d down", tops, bottoms));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Disabled: silent.
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      check(siren_out == 1'b0, "output while disabled");
    end
    siren_en = 1'b1;
    observe(600, 1'b1);
    // Disable, stay silent, re-enable: restarts at the middle frequency.
    siren_en = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      check(siren_out == 1'b0, "output after disable");
    end
    siren_en = 1'b1;
    observe(400, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
