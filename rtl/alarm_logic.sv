// Alarm output.
//
// The alarm is on while the timer is running and the time remaining has
// reached zero; stopping the timer (both buttons) or adding time (left
// button) silences it. The document shows only the block's inputs
// (seconds, run) and its output pin; this rule and the active-high output
// are this design's choices.
//
// Interface: seconds, run; alarm (1 = sounding). Timing: combinational.
module alarm_logic
  import timer_pkg::*;
(
  input  time_t seconds,
  input  logic  run,
  output logic  alarm
);

  assign alarm = run && (seconds == '0);

endmodule
