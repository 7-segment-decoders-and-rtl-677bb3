// Hexadecimal 7-segment decoder for a common-anode display.
//
// A constant array of sixteen 8-bit patterns, indexed by the 4-bit value,
// gives the active-high segments {dp, a, b, c, d, e, f, g} of the digits
// 0-9 and A, b, C, d, E, F; the output is the bitwise inverse, because a
// segment of a common-anode display lights when its cathode is driven low.
// The decimal point is never lit. The lookup-table form, the bit order
// (dp, a, ..., g), the active-low outputs and the hexadecimal digits follow
// the document; the patterns are the usual ones (6 with its top bar, 7
// without f, 9 with its bottom bar; lower-case b and d).
//
// Interface: value (4 bits); seg_n (8 bits, active low, bit 7 = dp, bit 0
// = g). Timing: purely combinational.
module seg7_decoder
  import timer_pkg::*;
(
  input  time_t value,
  output seg_t  seg_n
);

  //                              dp a b c d e f g
  localparam seg_t DECODER [16] = '{8'b0_1111110,   // 0
                                    8'b0_0110000,   // 1
                                    8'b0_1101101,   // 2
                                    8'b0_1111001,   // 3
                                    8'b0_0110011,   // 4
                                    8'b0_1011011,   // 5
                                    8'b0_1011111,   // 6
                                    8'b0_1110000,   // 7
                                    8'b0_1111111,   // 8
                                    8'b0_1111011,   // 9
                                    8'b0_1110111,   // A
                                    8'b0_0011111,   // b
                                    8'b0_1001110,   // C
                                    8'b0_0111101,   // d
                                    8'b0_1001111,   // E
                                    8'b0_1000111};  // F

  assign seg_n = ~DECODER[value];

endmodule
