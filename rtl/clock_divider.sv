// Clock divider: makes the 100 Hz system clock from the 50 MHz board clock.
//
// A counter runs from 0 to DIVISOR-1 on clk_in and wraps. The output is a
// flip-flop that is high for the one clk_in cycle after the counter wraps,
// so clk_out has one rising edge every DIVISOR input cycles, glitch-free
// because it comes straight from a register. The duty cycle is 1/DIVISOR,
// not 50%: only the rising edges are used downstream.
//
// The 50 MHz input and 100 Hz output (DIVISOR = 500 000) are the
// document's numbers, as is the rule that the clock must come from a
// flip-flop. The counter and one-cycle pulse shape are this design's choice.
// There is no reset: the wrap test is ">=", so the counter recovers from
// any power-up value within one period, and a single stray edge at power-up
// is harmless because the 100 Hz domain has its own power-on reset.
//
// Interface: clk_in in, clk_out out. Timing: the first rising edge of
// clk_out follows the counter's first wrap; after that exactly one rising
// edge per DIVISOR cycles of clk_in.
module clock_divider #(
  parameter int unsigned DIVISOR = 500_000  // 50 MHz / 100 Hz
) (
  input  logic clk_in,
  output logic clk_out
);

  localparam int unsigned CNT_W = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  logic [CNT_W-1:0] cnt;
  logic             wrap;

  assign wrap = (cnt >= CNT_W'(DIVISOR - 1));

  always_ff @(posedge clk_in) begin
    cnt     <= wrap ? '0 : cnt + 1'b1;
    clk_out <= wrap;
  end

endmodule
