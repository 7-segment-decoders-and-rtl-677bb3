// Testbench for clock_divider: checks that clk_out has exactly one rising
// edge every DIVISOR input cycles, that each high pulse lasts one input
// cycle, and that the counter recovers from its random power-up value.
module clock_divider_tb;
  localparam int unsigned DIV = 10;

  logic clk_in = 1'b0;
  logic clk_out;
  int   checks = 0, failures = 0;
  int   cyc = 0, last_rise = -1, rises = 0, high_len = 0;
  logic prev = 1'b0;

  clock_divider #(.DIVISOR(DIV)) dut (.clk_in(clk_in), .clk_out(clk_out));

  always #5 clk_in = ~clk_in;

  always @(posedge clk_in) begin
    cyc++;
    if (clk_out) high_len++;
    if (clk_out && !prev) begin
      // the first edge may come early, from the random power-up count
      if (last_rise >= 0 && rises >= 1) begin
        checks++;
        if (cyc - last_rise != DIV) begin
          failures++;
          $display("FAIL: period %0d, expected %0d", cyc - last_rise, DIV);
        end
      end
      last_rise = cyc;
      rises++;
    end
    if (!clk_out && prev && rises >= 2) begin
      checks++;
      if (high_len != 1) begin
        failures++;
        $display("FAIL: high for %0d cycles", high_len);
      end
    end
    if (!clk_out) high_len = 0;
    prev = clk_out;
  end

  initial begin
    repeat (DIV * 20 + 5) @(posedge clk_in);
    checks++;
    if (rises < 19) begin
      failures++;
      $display("FAIL: only %0d rising edges", rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
