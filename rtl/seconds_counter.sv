// Time-remaining register.
//
// seconds holds the time remaining, 0 to 15. In each 100 Hz cycle at most
// one of these applies, in this order of priority:
//   - left button released (LB -> NB) and seconds /= 15: add 1
//   - right button released (RB -> NB) and seconds /= 0: subtract 1
//   - left button held (rep_inc, optional hold-to-repeat) and
//     seconds /= 15: add 1
//   - right button held (rep_dec) and seconds /= 0: subtract 1
//   - running, one second elapsed (count = TICKS_PER_SEC-1) and
//     seconds /= 0: subtract 1
// Otherwise it holds. rep_inc and rep_dec only come while a button is held,
// never in a release cycle, and are tied to 0 when hold-to-repeat is off. The two button actions, their transitions and the
// limits at 0 and 15 follow the document. The countdown while running and
// the priority of button actions over the countdown are this design's
// choices; the count reaching zero does not stop the timer, it leaves run
// high so that the alarm can sound.
//
// Interface: clk (100 Hz), rst (synchronous, to 0), count (from the
// prescaler), state, state_next, run, rep_inc, rep_dec; seconds. Timing: seconds changes at
// the clock edge at which the button state leaves LB or RB for NB, or at
// which the prescaler wraps.
module seconds_counter
  import timer_pkg::*;
#(
  parameter int unsigned TICKS_PER_SEC = 100,
  localparam int unsigned CNT_W = (TICKS_PER_SEC > 1) ? $clog2(TICKS_PER_SEC) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] count,
  input  bstate_t          state,
  input  bstate_t          state_next,
  input  logic             run,
  input  logic             rep_inc,
  input  logic             rep_dec,
  output time_t            seconds
);

  logic  inc_btn, dec_btn, inc_rep, dec_rep, dec_tick;
  time_t seconds_next;

  assign inc_btn  = (state == LB) && (state_next == NB) && (seconds != time_t'(TIME_MAX));
  assign dec_btn  = (state == RB) && (state_next == NB) && (seconds != '0);
  assign inc_rep  = rep_inc && (seconds != time_t'(TIME_MAX));
  assign dec_rep  = rep_dec && (seconds != '0);
  assign dec_tick = run && (count == CNT_W'(TICKS_PER_SEC - 1)) && (seconds != '0);

  always_comb begin
    if (inc_btn)       seconds_next = seconds + 1'b1;
    else if (dec_btn)  seconds_next = seconds - 1'b1;
    else if (inc_rep)  seconds_next = seconds + 1'b1;
    else if (dec_rep)  seconds_next = seconds - 1'b1;
    else if (dec_tick) seconds_next = seconds - 1'b1;
    else               seconds_next = seconds;
  end

  always_ff @(posedge clk) begin
    if (rst) seconds <= '0;
    else     seconds <= seconds_next;
  end

endmodule
