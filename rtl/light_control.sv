// light_control: drives the status light from the controller's light mode.
//
// LIGHT_OFF holds the light off and LIGHT_ON holds it on. In LIGHT_BLINK the
// light toggles on every tick of a dedicated one-second divider, giving a
// two-second blink period. The divider is restarted when the mode changes
// to LIGHT_BLINK, so the first toggle comes one full second after blinking
// starts; until then the light keeps the level it had.
//
// Interface: clk, rst (synchronous, active high), mode (light_mode_e),
// light.
// Timing: light is registered. In blink mode the first toggle appears
// BLINK_DIVISOR+1 cycles after the first blink-mode cycle and then every
// BLINK_DIVISOR cycles. Mode codes, the private divider and its restart
// follow the original design; an unused mode code (2'b11) turns the light
// off, and the light is off after reset.
module light_control
  import antitheft_pkg::*;
#(
  parameter int unsigned BLINK_DIVISOR = SYS_CLK_HZ
) (
  input  logic        clk,
  input  logic        rst,
  input  light_mode_e mode,
  output logic        light
);

  logic blink_start;
  logic blink_tick;

  level_to_pulse u_blink_start (
    .clk  (clk),
    .rst  (rst),
    .level(mode == LIGHT_BLINK),
    .pulse(blink_start)
  );

  clock_divider #(.DIVISOR(BLINK_DIVISOR)) u_blink_div (
    .clk (clk),
    .rst (rst || blink_start),
    .tick(blink_tick)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      light <= 1'b0;
    end else begin
      case (mode)
        LIGHT_OFF:   light <= 1'b0;
        LIGHT_ON:    light <= 1'b1;
        LIGHT_BLINK: if (blink_tick) light <= ~light;
        default:     light <= 1'b0;
      endcase
    end
  end

endmodule
