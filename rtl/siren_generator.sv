// siren_generator: two-tone sweeping siren as a square wave.
//
// The tone comes from a variable clock divider: each of its ticks toggles
// the audio output, so the output frequency is CLK_HZ / (2 * divisor). A
// second divider with a fixed divisor (the sweep clock) sets how fast the
// tone divisor moves by one. In the ascending phase (asc = 1) the divisor
// starts at the middle frequency's value and is decremented on every sweep
// tick, raising the pitch, until it reaches the high frequency's value. The
// divisor then jumps back to the middle value and the descending phase
// increments it, lowering the pitch, until the low frequency's value, after
// which the cycle repeats. Every jump restarts the tone divider. With the
// default numbers the tone sweeps 500 -> 667 Hz, then 500 -> 400 Hz, each
// half taking about one second (divisor 27000 -> 20239 and 27000 -> 33750,
// one step every 4000 cycles).
//
// Interface: clk, rst (synchronous, active high), siren_en, siren_out.
// Timing: the generator restarts (middle frequency, ascending, output low)
// on reset and on each rising edge of siren_en; siren_out is forced low
// while siren_en is low. The divider values are CLK_HZ/(2*f) for the tone
// frequencies and CLK_HZ/SWEEP_HZ for the sweep clock, all integer
// divisions. Frequencies, sweep rate and structure follow the original
// design; expressing them as frequencies is a choice here.
module siren_generator #(
  parameter int unsigned CLK_HZ   = antitheft_pkg::SYS_CLK_HZ,
  parameter int unsigned MID_HZ   = 500,
  parameter int unsigned HIGH_HZ  = 667,
  parameter int unsigned LOW_HZ   = 400,
  parameter int unsigned SWEEP_HZ = 6750
) (
  input  logic clk,
  input  logic rst,
  input  logic siren_en,
  output logic siren_out
);

  localparam int unsigned MID_DIV   = CLK_HZ / (2 * MID_HZ);
  localparam int unsigned HIGH_DIV  = CLK_HZ / (2 * HIGH_HZ);
  localparam int unsigned LOW_DIV   = CLK_HZ / (2 * LOW_HZ);
  localparam int unsigned SWEEP_DIV = CLK_HZ / SWEEP_HZ;
  localparam int unsigned MAX_DIV   = (LOW_DIV > SWEEP_DIV) ? LOW_DIV : SWEEP_DIV;
  localparam int unsigned DW        = $clog2(MAX_DIV + 2);

  logic [DW-1:0] divisor_q;
  logic          asc_q;
  logic          tone_rst_q;
  logic          wave_q;
  logic          en_rise;
  logic          tone_tick;
  logic          sweep_tick;

  level_to_pulse u_en_rise (
    .clk  (clk),
    .rst  (rst),
    .level(siren_en),
    .pulse(en_rise)
  );

  var_clock_divider #(.W(DW)) u_tone_div (
    .clk    (clk),
    .rst    (tone_rst_q),
    .divisor(divisor_q),
    .tick   (tone_tick)
  );

  var_clock_divider #(.W(DW)) u_sweep_div (
    .clk    (clk),
    .rst    (rst),
    .divisor(DW'(SWEEP_DIV)),
    .tick   (sweep_tick)
  );

  always_ff @(posedge clk) begin
    if (rst || en_rise) begin
      divisor_q  <= DW'(MID_DIV);
      asc_q      <= 1'b1;
      tone_rst_q <= 1'b1;
      wave_q     <= 1'b0;
    end else begin
      if (tone_tick) wave_q <= ~wave_q;
      if (asc_q && divisor_q <= DW'(HIGH_DIV)) begin
        // Reached the high frequency: jump to the middle, start descending.
        divisor_q  <= DW'(MID_DIV);
        asc_q      <= 1'b0;
        tone_rst_q <= 1'b1;
      end else if (!asc_q && divisor_q >= DW'(LOW_DIV)) begin
        // Reached the low frequency: jump to the middle, start ascending.
        divisor_q  <= DW'(MID_DIV);
        asc_q      <= 1'b1;
        tone_rst_q <= 1'b1;
      end else begin
        tone_rst_q <= 1'b0;
        if (sweep_tick) divisor_q <= asc_q ? divisor_q - 1'b1 : divisor_q + 1'b1;
      end
    end
  end

  assign siren_out = siren_en && wave_q;

endmodule
