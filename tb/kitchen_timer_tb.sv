// End-to-end testbench for kitchen_timer at reduced clock ratios
// (CLK_DIVISOR = 4, TICKS_PER_SEC = 5), driving only the top-level pins.
//
// The time remaining is read back from the segment pins by matching them
// against digit patterns built independently here, and compared with a
// model of the user's actions. Covered, and counted (each must occur at
// least once): left-button increment, increment blocked at 15,
// right-button decrement, decrement blocked at 0, run started and stopped
// by pressing and releasing both buttons (in both press orders), a button
// held for many cycles, contact bounce shorter than one clock period,
// countdown while running, the countdown stopping at 0, the alarm, and a
// button action while running. Cycle counts checked: the generated clock
// period in board-clock cycles and the countdown period in generated-clock
// cycles.
module kitchen_timer_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned DIV   = 4;
  localparam int unsigned TICKS = 5;

  logic clk50 = 1'b0;
  logic left_in = 1'b1, right_in = 1'b1;  // released (pull-ups)
  logic a, b, c, d, e, f, g, dp, com, alarm;

  int checks = 0, failures = 0;
  int exp_secs = 0;
  logic exp_run = 1'b0;

  // mechanism counters
  int n_inc = 0, n_at15 = 0, n_dec = 0, n_at0 = 0, n_start = 0, n_stop = 0;
  int n_order_rl = 0, n_hold = 0, n_bounce = 0, n_tick = 0, n_stuck0 = 0;
  int n_alarm = 0, n_run_action = 0;

  kitchen_timer #(.CLK_DIVISOR(DIV), .TICKS_PER_SEC(TICKS)) dut (
    .clk50(clk50), .left_in(left_in), .right_in(right_in),
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .g(g), .dp(dp),
    .com(com), .alarm(alarm));

  always #10 clk50 = ~clk50;  // 50 MHz: 20 ns period

  // Bit k set when hexadecimal digit k lights the segment.
  //                        FEDCBA9876543210
  localparam logic [15:0] SA = 16'b1101011111101101;
  localparam logic [15:0] SB = 16'b0010011110011111;
  localparam logic [15:0] SC = 16'b0010111111111011;
  localparam logic [15:0] SD = 16'b0111101101101101;
  localparam logic [15:0] SE = 16'b1111110101000101;
  localparam logic [15:0] SF = 16'b1101111101110001;
  localparam logic [15:0] SG = 16'b1110111101111100;

  // Digit shown on the display, or -1 if the pattern is no hex digit.
  function automatic int shown();
    for (int k = 0; k < 16; k++)
      if ({a, b, c, d, e, f, g} == ~{SA[k], SB[k], SC[k], SD[k], SE[k], SF[k], SG[k]})
        return k;
    return -1;
  endfunction

  task automatic check(string what);
    checks++;
    if (shown() != exp_secs || alarm !== (exp_run && exp_secs == 0) || dp !== 1'b1 || com !== 1'b1) begin
      failures++;
      $display("FAIL %s: shown=%0d expected=%0d alarm=%b exp_run=%b dp=%b com=%b",
               what, shown(), exp_secs, alarm, exp_run, dp, com);
    end
  endtask

  task automatic cycles(int n);
    repeat (n) @(posedge dut.clk);
    #1;
  endtask

  // Press and release one button; bounce adds sub-period chatter on both edges.
  task automatic tap(bit left, int hold, bit bounce);
    if (bounce) begin
      repeat (3) begin
        @(negedge clk50);
        if (left) left_in = ~left_in; else right_in = ~right_in;
      end
      n_bounce++;
    end
    if (left) left_in = 1'b0; else right_in = 1'b0;
    cycles(hold);
    if (bounce) begin
      repeat (3) begin
        @(negedge clk50);
        if (left) left_in = ~left_in; else right_in = ~right_in;
      end
    end
    if (left) left_in = 1'b1; else right_in = 1'b1;
    cycles(5);
  endtask

  task automatic left_tap(int hold = 2, bit bounce = 0);
    if (exp_secs == 15) n_at15++; else begin exp_secs++; n_inc++; end
    tap(1, hold, bounce);
    check("left");
  endtask

  task automatic right_tap(int hold = 2, bit bounce = 0);
    if (exp_secs == 0) n_at0++; else begin exp_secs--; n_dec++; end
    tap(0, hold, bounce);
    check("right");
  endtask

  // Press both (right first if rfirst), release both in the other order.
  task automatic both_tap(bit rfirst);
    if (rfirst) right_in = 1'b0; else left_in = 1'b0;
    cycles(2);
    if (rfirst) left_in = 1'b0; else right_in = 1'b0;
    cycles(3);
    if (rfirst) right_in = 1'b1; else left_in = 1'b1;
    cycles(2);
    if (rfirst) left_in = 1'b1; else right_in = 1'b1;
    exp_run = ~exp_run;
    if (exp_run) n_start++; else n_stop++;
    if (rfirst) n_order_rl++;
    cycles(4);
  endtask

  int t_edge, t_prev, period;
  int last_shown, last_change;

  initial begin
    // generated-clock period in board-clock cycles
    @(posedge dut.clk);
    t_prev = 0;
    t_edge = 0;
    fork
      begin
        forever begin @(posedge clk50); t_edge++; end
      end
      begin
        repeat (3) @(posedge dut.clk);
      end
    join_any
    disable fork;
    checks++;
    if (t_edge != 3 * DIV) begin
      failures++;
      $display("FAIL: 3 clk periods took %0d board cycles, expected %0d", t_edge, 3 * DIV);
    end
    cycles(4);
    check("after reset");

    // increments, with a long hold and with bounce
    left_tap();
    left_tap(20);  n_hold++;
    left_tap(2, 1);
    for (int i = 0; i < 14; i++) left_tap();   // runs into 15
    // decrements
    right_tap();
    right_tap(2, 1);
    for (int i = 0; i < 15; i++) right_tap();  // runs into 0
    for (int i = 0; i < 3; i++) left_tap();    // 3

    // start with left pressed first, count down to zero
    both_tap(0);
    check("started");
    last_shown = shown();
    last_change = 0;
    for (int cyc = 1; cyc <= TICKS * 6; cyc++) begin
      cycles(1);
      if (shown() != last_shown) begin
        checks++;
        if (shown() != last_shown - 1) begin
          failures++;
          $display("FAIL: countdown %0d -> %0d", last_shown, shown());
        end
        if (last_change != 0) begin
          checks++;
          if (cyc - last_change != TICKS) begin
            failures++;
            $display("FAIL: countdown step after %0d cycles, expected %0d", cyc - last_change, TICKS);
          end
        end
        n_tick++;
        last_change = cyc;
        last_shown = shown();
      end
    end
    exp_secs = 0;
    check("counted down");
    if (alarm) n_alarm++;
    n_stuck0++;

    // a button while running: add time, alarm stops, countdown resumes
    left_tap(); n_run_action++;
    cycles(TICKS + 1);
    exp_secs = 0;
    check("recounted");

    // stop (right pressed first), alarm off
    both_tap(1);
    check("stopped");
    left_tap();
    cycles(3 * TICKS);
    check("no countdown when stopped");
    right_tap();
    right_tap();  // blocked at zero

    checks += 13;
    if (n_inc == 0 || n_at15 == 0 || n_dec == 0 || n_at0 == 0 || n_start == 0 ||
        n_stop == 0 || n_order_rl == 0 || n_hold == 0 || n_bounce == 0 ||
        n_tick < 3 || n_stuck0 == 0 || n_alarm == 0 || n_run_action == 0) begin
      failures++;
      $display("FAIL: coverage inc=%0d at15=%0d dec=%0d at0=%0d start=%0d stop=%0d rl=%0d hold=%0d bounce=%0d tick=%0d stuck0=%0d alarm=%0d runact=%0d",
               n_inc, n_at15, n_dec, n_at0, n_start, n_stop, n_order_rl, n_hold,
               n_bounce, n_tick, n_stuck0, n_alarm, n_run_action);
    end
    $display("coverage inc=%0d at15=%0d dec=%0d at0=%0d start=%0d stop=%0d rl=%0d hold=%0d bounce=%0d tick=%0d stuck0=%0d alarm=%0d runact=%0d",
             n_inc, n_at15, n_dec, n_at0, n_start, n_stop, n_order_rl, n_hold,
             n_bounce, n_tick, n_stuck0, n_alarm, n_run_action);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 20 000 generated-clock periods
  initial begin
    repeat (20000 * DIV) @(posedge clk50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
