// fuel_pump_logic: hidden immobilizer that gates power to the fuel pump.
//
// A three-state machine. RESET (pump off) is left when the ignition turns
// on. In IGNITION (pump still off) the machine waits until the brake pedal
// and the hidden switch are pressed in the same cycle, then enters ACTIVE.
// ACTIVE powers the pump and ignores brake and hidden switch, so only the
// ignition keeps it there. Turning the ignition off from IGNITION or ACTIVE
// returns to RESET. Pressing brake and hidden switch before the ignition is
// on does nothing: the order ignition-then-both is what unlocks the pump.
//
// Interface: clk, rst (synchronous, active high), debounced ignition, brake
// and hidden inputs; pump output.
// Timing: pump is decoded from the state register, so it rises one cycle
// after the cycle in which brake and hidden are both seen, and falls one
// cycle after ignition is seen off. All of this follows the original design.
module fuel_pump_logic (
  input  logic clk,
  input  logic rst,
  input  logic ignition,
  input  logic brake,
  input  logic hidden,
  output logic pump
);

  typedef enum logic [1:0] {
    PUMP_RESET    = 2'b00,
    PUMP_IGNITION = 2'b01,
    PUMP_ACTIVE   = 2'b10
  } pump_state_e;

  pump_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      PUMP_RESET:    if (ignition) state_d = PUMP_IGNITION;
      PUMP_IGNITION: if (!ignition) state_d = PUMP_RESET;
                     else if (brake && hidden) state_d = PUMP_ACTIVE;
      PUMP_ACTIVE:   if (!ignition) state_d = PUMP_RESET;
      default:       state_d = PUMP_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= PUMP_RESET;
    else     state_q <= state_d;
  end

  assign pump = (state_q == PUMP_ACTIVE);

endmodule
