// Kitchen timer: a 0-15 second countdown timer for a small CPLD board, set
// and started with two pushbuttons and shown as one hexadecimal digit on a
// common-anode 7-segment display.
//
// Structure. clock_divider turns the 50 MHz board clock into a 100 Hz
// clock taken from a flip-flop; every other register runs on that clock.
// The active-low buttons (pull-ups, pressed = 0) are inverted and sampled
// by one clk_debounce each, giving l and r. button_fsm tracks the buttons
// (NB, LB, RB, BB) and exports its state and next state; every action is
// keyed to a transition back to NB, i.e. to a release:
//   LB -> NB  left pressed and released alone:  time + 1 (not above 15)
//   RB -> NB  right pressed and released alone: time - 1 (not below 0)
//   BB -> NB  both pressed, then both released: toggle run/stop
// While running, second_prescaler counts 100 cycles per second and
// seconds_counter subtracts one per second down to 0. seg7_decoder shows
// the time; alarm_logic raises alarm while running at 0. The common pin
// com is driven high. With HOLD_REPEAT set (off by default, so the
// required behaviour is unchanged), button_hold_timer adds the optional
// hold-to-repeat: a button held alone for more than a second steps the
// time at four steps per second.
//
// The block partition, the signal names, the 50 MHz / 100 Hz clocks, the
// button rules, the 0..15 range, the lookup-table decoder and the
// active-low segment outputs follow the document. This design's own
// choices: the power-on reset below, the one-second countdown period, the
// alarm rule, the inversion of the buttons before the debouncers, and a
// repeat period of 2 cycles when TICKS_PER_SEC is below 8.
//
// Reset. The board has no reset pin, so a two-flop power-on reset in the
// 100 Hz domain holds the logic in reset for its first two clock edges.
// Its register has a declaration initial value, the power-up state of the
// device's flip-flops; this is the one register that relies on it (the
// lint notice about an initial value on a procedurally written variable
// is expected here).
//
// Ports: clk50 (50 MHz), left_in and right_in (buttons, active low);
// a..g and dp (segments, active low), com (display common anode, always
// 1), alarm (active high). Timing: a button action takes effect at the
// third 100 Hz edge after the release reaches the pin (two in the
// debouncer, one in the state register).
module kitchen_timer
  import timer_pkg::*;
#(
  parameter int unsigned CLK_DIVISOR   = 500_000,  // 50 MHz -> 100 Hz
  parameter int unsigned TICKS_PER_SEC = 100,      // 100 Hz cycles per second
  parameter bit          HOLD_REPEAT   = 1'b0,     // optional hold-to-repeat
  localparam int unsigned CNT_W = (TICKS_PER_SEC > 1) ? $clog2(TICKS_PER_SEC) : 1
) (
  input  logic clk50,
  input  logic left_in,
  input  logic right_in,
  output logic a,
  output logic b,
  output logic c,
  output logic d,
  output logic e,
  output logic f,
  output logic g,
  output logic dp,
  output logic com,
  output logic alarm
);

  logic             clk;
  logic             rst;
  logic [1:0]       por = 2'b00;
  logic             l, r;
  bstate_t          state, state_next;
  logic             run;
  logic [CNT_W-1:0] count;
  time_t            seconds;
  seg_t             seg_n;
  logic             hold_inc, hold_dec, rep_inc, rep_dec;

  clock_divider #(.DIVISOR(CLK_DIVISOR)) u_clkdiv (
    .clk_in (clk50),
    .clk_out(clk)
  );

  // Power-on reset: rst is high until two 100 Hz edges have passed.
  always_ff @(posedge clk) por <= {por[0], 1'b1};
  assign rst = ~por[1];

  clk_debounce u_deb_left (
    .clk    (clk),
    .rst    (rst),
    .btn_in (~left_in),
    .btn_out(l)
  );

  clk_debounce u_deb_right (
    .clk    (clk),
    .rst    (rst),
    .btn_in (~right_in),
    .btn_out(r)
  );

  button_fsm u_fsm (
    .clk       (clk),
    .rst       (rst),
    .l         (l),
    .r         (r),
    .state     (state),
    .state_next(state_next)
  );

  run_toggle u_run (
    .clk       (clk),
    .rst       (rst),
    .state     (state),
    .state_next(state_next),
    .run       (run)
  );

  second_prescaler #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_presc (
    .clk  (clk),
    .rst  (rst),
    .run  (run),
    .count(count)
  );

  // Optional hold-to-repeat: after 1 s on one button, 4 steps per second.
  button_hold_timer #(
    .HOLD_TICKS  (TICKS_PER_SEC),
    .REPEAT_TICKS((TICKS_PER_SEC >= 8) ? TICKS_PER_SEC / 4 : 2)
  ) u_hold (
    .clk       (clk),
    .rst       (rst),
    .state     (state),
    .state_next(state_next),
    .rep_inc   (hold_inc),
    .rep_dec   (hold_dec)
  );

  assign rep_inc = HOLD_REPEAT && hold_inc;
  assign rep_dec = HOLD_REPEAT && hold_dec;

  seconds_counter #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_secs (
    .clk       (clk),
    .rst       (rst),
    .count     (count),
    .state     (state),
    .state_next(state_next),
    .run       (run),
    .rep_inc   (rep_inc),
    .rep_dec   (rep_dec),
    .seconds   (seconds)
  );

  seg7_decoder u_dec (
    .value(seconds),
    .seg_n(seg_n)
  );

  assign {dp, a, b, c, d, e, f, g} = seg_n;

  alarm_logic u_alarm (
    .seconds(seconds),
    .run    (run),
    .alarm  (alarm)
  );

  assign com = 1'b1;

endmodule
