// Two-button controller state machine.
//
// Inputs are the two synchronized buttons, l and r (1 = pressed). The
// state records which buttons have been pressed since both were last
// released:
//   NB: L=1 -> LB, else R=1 -> RB, else stay
//   LB: R=1 -> BB, else L=0 -> NB, else stay
//   RB: L=1 -> BB, else R=0 -> NB, else stay
//   BB: L=0 and R=0 -> NB, else stay
// The four states, the transitions and their conditions, and the NB
// priority of L over R follow the document. Where two exits of LB or RB are
// true at once (one button released in the same sample as the other is
// pressed) this design takes the move to BB.
//
// Both the registered state and the combinational next state are outputs,
// so that actions can be tied to a transition (state, state_next) and
// happen exactly once, in the clock cycle before the state register moves.
//
// Interface: clk (100 Hz), rst (synchronous, to NB), l, r; state,
// state_next. Timing: state_next is combinational from state, l and r;
// state takes its value at the next rising edge.
module button_fsm
  import timer_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    l,
  input  logic    r,
  output bstate_t state,
  output bstate_t state_next
);

  always_comb begin
    state_next = state;
    unique case (state)
      NB: if (l) state_next = LB;
          else if (r) state_next = RB;
      LB: if (r) state_next = BB;
          else if (!l) state_next = NB;
      RB: if (l) state_next = BB;
          else if (!r) state_next = NB;
      BB: if (!l && !r) state_next = NB;
      default: state_next = NB;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= NB;
    else     state <= state_next;
  end

endmodule
