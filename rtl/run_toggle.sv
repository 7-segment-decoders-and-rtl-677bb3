// Run/stop register.
//
// The run flip-flop toggles when both buttons have been pressed and then
// both released, that is on the BB -> NB transition of the button state
// machine. Acting on the transition, rather than on a state, makes the
// toggle happen once per press-and-release however long the buttons are
// held. Toggling on both-buttons-released follows the document; the
// stopped state after reset is this design's choice.
//
// Interface: clk (100 Hz), rst (synchronous, to stopped), state,
// state_next; run (1 = timer counting down). Timing: run changes at the
// same clock edge at which the state moves from BB to NB.
module run_toggle
  import timer_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  bstate_t state,
  input  bstate_t state_next,
  output logic    run
);

  logic toggle;

  assign toggle = (state == BB) && (state_next == NB);

  always_ff @(posedge clk) begin
    if (rst)         run <= 1'b0;
    else if (toggle) run <= ~run;
  end

endmodule
