// Testbench for second_prescaler: while run is high count must wrap every
// TICKS cycles, reaching TICKS-1 first on the TICKS-th edge after run
// rises; while run is low it must read 0.
module second_prescaler_tb;
  localparam int unsigned TICKS = 7;
  localparam int unsigned W = $clog2(TICKS);

  logic         clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic [W-1:0] count;
  int checks = 0, failures = 0, edges, exp;

  second_prescaler #(.TICKS_PER_SEC(TICKS)) dut (.clk(clk), .rst(rst), .run(run), .count(count));

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    rst = 1'b0;
    for (int burst = 0; burst < 6; burst++) begin
      // stopped: hold at zero
      repeat ($urandom_range(1, 5)) begin
        @(posedge clk); #1;
        checks++;
        if (count !== '0) begin failures++; $display("FAIL: count %0d while stopped", count); end
      end
      run = 1'b1;
      edges = 0;
      repeat ($urandom_range(TICKS, 4 * TICKS)) begin
        @(posedge clk); #1;
        edges++;
        exp = edges % TICKS;
        checks++;
        if (count !== W'(exp)) begin
          failures++;
          $display("FAIL: edge %0d count %0d expected %0d", edges, count, exp);
        end
      end
      run = 1'b0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
