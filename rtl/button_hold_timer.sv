// Button hold timer for the optional hold-to-repeat feature.
//
// A down-counter, btimer, is reloaded with HOLD_TICKS whenever the button
// state machine is about to change state, and otherwise counts down to 0.
// It therefore measures how long the current state has lasted. Once the
// left (LB) or right (RB) button alone has been held for HOLD_TICKS cycles
// (1 s at 100 Hz), a one-cycle step pulse, rep_inc or rep_dec, is issued
// and btimer is reloaded with REPEAT_TICKS-1. So while the button stays
// down, a further pulse follows every REPEAT_TICKS cycles (25 cycles = 4
// steps per second). Releasing the button, pressing the other one or any
// other state change restarts the hold time.
//
// Following the document: a timer reset on state transitions (its example
// loads 100 into an 8-bit btimer when state_next /= state), a hold of more
// than one second, and a repeat rate of about four seconds per second.
// This design's own choices: counting down to 0 rather than comparing,
// exactly 4 steps per second, and one-cycle pulses that the time register
// adds to the normal release action (the release still counts one step).
//
// Interface: clk (100 Hz), rst (synchronous), state, state_next; rep_inc,
// rep_dec (one-cycle step requests). Timing: the first step takes effect
// at the HOLD_TICKS-th clock edge after the state entered LB or RB, each
// further step REPEAT_TICKS edges after the one before.
module button_hold_timer
  import timer_pkg::*;
#(
  parameter int unsigned HOLD_TICKS   = 100,  // 1 s at 100 Hz
  parameter int unsigned REPEAT_TICKS = 25,   // 4 steps per second
  localparam int unsigned BT_W = $clog2(HOLD_TICKS + 1)
) (
  input  logic    clk,
  input  logic    rst,
  input  bstate_t state,
  input  bstate_t state_next,
  output logic    rep_inc,
  output logic    rep_dec
);

  logic [BT_W-1:0] btimer;
  logic            held;

  assign held    = (btimer == '0) && (state_next == state);
  assign rep_inc = held && (state == LB);
  assign rep_dec = held && (state == RB);

  always_ff @(posedge clk) begin
    if (rst || state_next != state)
      btimer <= BT_W'(HOLD_TICKS - 1);
    else if (rep_inc || rep_dec)
      btimer <= BT_W'(REPEAT_TICKS - 1);
    else if (btimer != '0)
      btimer <= btimer - 1'b1;
  end

  initial begin
    assert (HOLD_TICKS >= 1 && REPEAT_TICKS >= 1)
      else $error("button_hold_timer: HOLD_TICKS and REPEAT_TICKS must be at least 1");
  end

endmodule
