// One-second prescaler for the countdown.
//
// While run is high the counter counts 100 Hz cycles from 0 to
// TICKS_PER_SEC-1 and wraps; while run is low it is held at 0, so every
// start gives a full second before the first decrement. The seconds
// counter decrements on the cycle in which count is TICKS_PER_SEC-1 and run
// is high.
//
// The document shows this block only by its name and connections (run in,
// count out) and says the design is clocked at 100 Hz. The one-second
// period (100 cycles), the hold-at-zero when stopped and the count
// interface are this design's choices.
//
// Interface: clk (100 Hz), rst (synchronous), run; count. Timing: after
// run rises, count reaches TICKS_PER_SEC-1 on the TICKS_PER_SEC-th clock
// edge, and every TICKS_PER_SEC edges after that.
module second_prescaler #(
  parameter int unsigned TICKS_PER_SEC = 100,
  localparam int unsigned CNT_W = (TICKS_PER_SEC > 1) ? $clog2(TICKS_PER_SEC) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             run,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || !run)
      count <= '0;
    else if (count >= CNT_W'(TICKS_PER_SEC - 1))
      count <= '0;
    else
      count <= count + 1'b1;
  end

endmodule
