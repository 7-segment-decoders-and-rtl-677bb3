// Testbench for seconds_counter: random state transitions, hold-to-repeat
// requests, run and count values against a reference model of the actions
// (left release +1, right release -1, held left +1, held right -1,
// one-second tick -1 while running), their priority and
// the limits 0 and 15 (a blocked increment at 15 lets a tick through).
// Counts how often each action and each limit case
// occurred and fails if one never did.
module seconds_counter_tb;
  import timer_pkg::*;
  localparam int unsigned TICKS = 4;
  localparam int unsigned W = $clog2(TICKS);

  logic         clk = 1'b0, rst = 1'b1, run = 1'b0, rep_inc = 1'b0, rep_dec = 1'b0;
  logic [W-1:0] count = '0;
  bstate_t      state = NB, state_next = NB;
  time_t        seconds;
  int model, bias, pick;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_tick = 0, n_at15 = 0, n_at0 = 0, n_rinc = 0, n_rdec = 0;
  bit done;

  seconds_counter #(.TICKS_PER_SEC(TICKS)) dut (
    .clk(clk), .rst(rst), .count(count), .state(state), .state_next(state_next),
    .run(run), .rep_inc(rep_inc), .rep_dec(rep_dec), .seconds(seconds));

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    rst = 1'b0;
    model = 0;
    for (int i = 0; i < 4000; i++) begin
      // phases: mostly increments, then mostly decrements, so both limits are hit
      bias = (i / 500) % 2;
      pick = $urandom_range(0, 9);
      state = NB; state_next = NB;
      if (pick < 4) begin
        state = bias ? RB : LB; state_next = NB;
      end else if (pick < 5) begin
        state = bias ? LB : RB; state_next = NB;
      end else if (pick < 7) begin
        state = bstate_t'($urandom_range(0, 3)); state_next = bstate_t'($urandom_range(0, 3));
      end
      // hold-to-repeat steps only come while the state is unchanged
      rep_inc = 1'b0; rep_dec = 1'b0;
      if (pick >= 7 && pick < 9) begin
        state = bias ? RB : LB; state_next = state;
        if (bias) rep_dec = 1'b1; else rep_inc = 1'b1;
      end
      run   = 1'($urandom_range(0, 1));
      count = W'($urandom_range(0, TICKS - 1));
      @(posedge clk); #1;
      // first applicable action wins; a blocked one passes to the next
      done = 0;
      if (state == LB && state_next == NB) begin
        if (model < 15) begin model++; n_inc++; done = 1; end else n_at15++;
      end
      if (!done && state == RB && state_next == NB) begin
        if (model > 0) begin model--; n_dec++; done = 1; end else n_at0++;
      end
      if (!done && rep_inc) begin
        if (model < 15) begin model++; n_rinc++; done = 1; end else n_at15++;
      end
      if (!done && rep_dec) begin
        if (model > 0) begin model--; n_rdec++; done = 1; end else n_at0++;
      end
      if (!done && run && count == W'(TICKS - 1)) begin
        if (model > 0) begin model--; n_tick++; end else n_at0++;
      end
      checks++;
      if (int'(seconds) != model) begin
        failures++;
        $display("FAIL: i=%0d seconds=%0d expected %0d", i, seconds, model);
        model = int'(seconds);
      end
    end
    checks += 7;
    if (n_inc == 0 || n_dec == 0 || n_tick == 0 || n_at15 == 0 || n_at0 == 0 ||
        n_rinc == 0 || n_rdec == 0) begin
      failures++;
      $display("FAIL: coverage inc=%0d dec=%0d rinc=%0d rdec=%0d tick=%0d at15=%0d at0=%0d",
               n_inc, n_dec, n_rinc, n_rdec, n_tick, n_at15, n_at0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
