// debouncer: synchronizes a mechanical switch and filters its bounce.
//
// The raw input passes through a two-flop synchronizer. A sample register
// holds the last synchronized value seen; whenever the synchronized input
// differs from it, the sample is updated and a stability counter restarts
// at zero. Only when the counter has reached DELAY (the input unchanged for
// DELAY cycles) is the sample copied to the clean output. Any change that
// lasts less than DELAY cycles therefore never reaches the output.
//
// Interface: clk, rst (synchronous, active high), noisy in, clean out.
// Timing: a clean change appears DELAY+4 cycles after the raw input settles
// (2 synchronizer stages, 1 sample update, DELAY counts, 1 output update).
// DELAY defaults to 270 000 cycles, 10 ms at 27 MHz, as in the original
// design. On reset the output and sample take the input's current value, as
// in the original. The two-flop synchronizer is this design's addition.
module debouncer #(
  parameter int unsigned DELAY = 270_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned CW = (DELAY < 1) ? 1 : $clog2(DELAY + 1);

  logic [1:0]    sync_q;
  logic          sample_q;
  logic [CW-1:0] count_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q   <= {noisy, noisy};
      sample_q <= noisy;
      clean    <= noisy;
      count_q  <= '0;
    end else begin
      sync_q <= {sync_q[0], noisy};
      if (sync_q[1] != sample_q) begin
        sample_q <= sync_q[1];
        count_q  <= '0;
      end else if (count_q == CW'(DELAY)) begin
        clean <= sample_q;
      end else begin
        count_q <= count_q + 1'b1;
      end
    end
  end

endmodule
