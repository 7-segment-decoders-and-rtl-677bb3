// Testbench for run_toggle: run must flip exactly on BB -> NB and hold for
// every other (state, state_next) pair.
module run_toggle_tb;
  import timer_pkg::*;

  logic    clk = 1'b0, rst = 1'b1, run, exp_run;
  bstate_t state = NB, state_next = NB;
  int checks = 0, failures = 0, toggles = 0;

  run_toggle dut (.clk(clk), .rst(rst), .state(state), .state_next(state_next), .run(run));

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    checks++;
    if (run !== 1'b0) begin failures++; $display("FAIL: run not 0 after reset"); end
    rst = 1'b0;
    exp_run = 1'b0;
    for (int i = 0; i < 500; i++) begin
      state      = bstate_t'($urandom_range(0, 3));
      state_next = bstate_t'($urandom_range(0, 3));
      @(posedge clk); #1;
      if (state == BB && state_next == NB) begin
        exp_run = ~exp_run;
        toggles++;
      end
      checks++;
      if (run !== exp_run) begin
        failures++;
        $display("FAIL: %s->%s run=%b expected %b", state.name(), state_next.name(), run, exp_run);
      end
    end
    checks++;
    if (toggles == 0) begin failures++; $display("FAIL: no toggle exercised"); end
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
