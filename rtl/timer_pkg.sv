// Shared types and constants of the kitchen timer.
//
// bstate_t is the state of the two-button controller: no button (NB), left
// button (LB), right button (RB) or both buttons (BB) pressed since the last
// time both were released. The four state names follow the controller's
// state diagram; the enum leaves the encoding to the synthesis tool, which
// on CPLD/FPGA targets is free to choose one-hot.
//
// The time remaining is a 4-bit value, 0 to 15, shown as one hexadecimal
// digit. The 7-segment vector is ordered {dp, a, b, c, d, e, f, g}, dp in
// bit 7 and g in bit 0.
package timer_pkg;

  typedef enum logic [1:0] {
    NB,  // no button pushed
    LB,  // left button was pushed (and the right one was not)
    RB,  // right button was pushed (and the left one was not)
    BB   // both buttons were pushed; waiting for both to be released
  } bstate_t;

  localparam int unsigned TIME_W   = 4;   // bits of the time remaining
  localparam int unsigned TIME_MAX = 15;  // largest time remaining

  typedef logic [TIME_W-1:0] time_t;

  // One 7-segment pattern, bit 7 = dp, bits 6..0 = a, b, c, d, e, f, g.
  typedef logic [7:0] seg_t;

endpackage
