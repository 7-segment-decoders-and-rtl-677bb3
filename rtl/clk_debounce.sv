// Pushbutton synchronizer/debouncer for a 100 Hz clock.
//
// The button is sampled by two flip-flops in series on the 100 Hz clock.
// The first brings the asynchronous input into the clock domain, the second
// gives the first a full 10 ms to settle from metastability. Sampling every
// 10 ms is itself the debouncer: contact bounce lasting less than one clock
// period can be seen by at most one sample, so the output changes at most
// once per press or release.
//
// The document names this block and says it is a synchronizer/debouncer
// built for a 100 Hz clock; its insides are this design's own choice.
// Polarity is passed through unchanged (the top level inverts the
// active-low buttons).
//
// Interface: clk (100 Hz), rst (synchronous, active high), btn_in
// (asynchronous), btn_out. Timing: btn_out follows btn_in two clock edges
// later.
module clk_debounce (
  input  logic clk,
  input  logic rst,
  input  logic btn_in,
  output logic btn_out
);

  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta    <= 1'b0;
      btn_out <= 1'b0;
    end else begin
      meta    <= btn_in;
      btn_out <= meta;
    end
  end

endmodule
