// Testbench for button_hold_timer (HOLD_TICKS = 6, REPEAT_TICKS = 3).
// The state inputs dwell in random states for random times. A reference
// counts the clock edges since the state was entered (age) and expects a
// step pulse in a cycle where the state is LB or RB and stays so, at ages
// HOLD-1, HOLD-1+REPEAT, HOLD-1+2*REPEAT, ... That is, the step takes effect
// HOLD edges after entry and every REPEAT edges after that.
module button_hold_timer_tb;
  import timer_pkg::*;
  localparam int unsigned HOLD = 6, REP = 3;

  logic    clk = 1'b0, rst = 1'b1;
  bstate_t state = NB, state_next = NB;
  logic    rep_inc, rep_dec;
  int checks = 0, failures = 0, age = 0, dwell, n_inc = 0, n_dec = 0, n_multi = 0, run_len;
  logic exp_inc, exp_dec;

  button_hold_timer #(.HOLD_TICKS(HOLD), .REPEAT_TICKS(REP)) dut (
    .clk(clk), .rst(rst), .state(state), .state_next(state_next),
    .rep_inc(rep_inc), .rep_dec(rep_dec));

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    rst = 1'b0;
    age = 0;
    for (int seg = 0; seg < 200; seg++) begin
      dwell = $urandom_range(1, 20);
      run_len = 0;
      for (int k = 0; k < dwell; k++) begin
        // last cycle of the dwell announces a change
        if (k == dwell - 1) state_next = bstate_t'((int'(state) + $urandom_range(1, 3)) % 4);
        else                state_next = state;
        #1;  // let the outputs settle
        exp_inc = (state_next == state) && state == LB && age >= HOLD - 1 && (age - (HOLD - 1)) % REP == 0;
        exp_dec = (state_next == state) && state == RB && age >= HOLD - 1 && (age - (HOLD - 1)) % REP == 0;
        checks++;
        if (rep_inc !== exp_inc || rep_dec !== exp_dec) begin
          failures++;
          $display("FAIL: state=%s age=%0d rep_inc=%b rep_dec=%b expected %b %b",
                   state.name(), age, rep_inc, rep_dec, exp_inc, exp_dec);
        end
        if (exp_inc) n_inc++;
        if (exp_dec) n_dec++;
        if (exp_inc || exp_dec) run_len++;
        @(posedge clk); #1;
        age++;
      end
      if (run_len >= 2) n_multi++;
      state = state_next;
      age = 0;
    end
    checks++;
    if (n_inc == 0 || n_dec == 0 || n_multi == 0) begin
      failures++;
      $display("FAIL: coverage inc=%0d dec=%0d repeated=%0d", n_inc, n_dec, n_multi);
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
