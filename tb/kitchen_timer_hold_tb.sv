// End-to-end testbench for kitchen_timer with the optional hold-to-repeat
// feature on (HOLD_REPEAT = 1, CLK_DIVISOR = 4, TICKS_PER_SEC = 8, so the
// hold time is 8 cycles and the repeat period 2 cycles).
//
// Through the pins only, the digit being read back from the segments:
// short taps still step by exactly one; a held button steps first HOLD
// edges after the state machine registers the press, i.e. 3 + HOLD edges
// after the pin goes low, and then once every REPEAT edges; the release
// adds its normal single step (steps that fall in the two-edge debounce
// delay after the release are expected too); holding stops at 15 and at 0; and pressing
// both buttons for a long time still only toggles run. Each of these is
// counted and must occur at least once.
module kitchen_timer_hold_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned DIV = 4, TICKS = 8, HOLD = 8, REP = 2;

  logic clk50 = 1'b0;
  logic left_in = 1'b1, right_in = 1'b1;
  logic a, b, c, d, e, f, g, dp, com, alarm;
  int checks = 0, failures = 0;
  int n_tap = 0, n_first = 0, n_repeat = 0, n_release = 0, n_sat15 = 0, n_sat0 = 0, n_both = 0;

  kitchen_timer #(.CLK_DIVISOR(DIV), .TICKS_PER_SEC(TICKS), .HOLD_REPEAT(1'b1)) dut (
    .clk50(clk50), .left_in(left_in), .right_in(right_in),
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .g(g), .dp(dp),
    .com(com), .alarm(alarm));

  always #10 clk50 = ~clk50;

  //                        FEDCBA9876543210
  localparam logic [15:0] SA = 16'b1101011111101101;
  localparam logic [15:0] SB = 16'b0010011110011111;
  localparam logic [15:0] SC = 16'b0010111111111011;
  localparam logic [15:0] SD = 16'b0111101101101101;
  localparam logic [15:0] SE = 16'b1111110101000101;
  localparam logic [15:0] SF = 16'b1101111101110001;
  localparam logic [15:0] SG = 16'b1110111101111100;

  function automatic int shown();
    for (int k = 0; k < 16; k++)
      if ({a, b, c, d, e, f, g} == ~{SA[k], SB[k], SC[k], SD[k], SE[k], SF[k], SG[k]})
        return k;
    return -1;
  endfunction

  task automatic cycles(int n);
    repeat (n) @(posedge dut.clk);
    #1;
  endtask

  task automatic expect_shown(int v, string what);
    checks++;
    if (shown() != v) begin
      failures++;
      $display("FAIL %s: shown %0d expected %0d", what, shown(), v);
    end
  endtask

  // Hold one button for `len` edges, checking at which edge after the
  // press each step appears, then release and expect one final step.
  task automatic hold(bit left, int len, int start);
    int v, expv, edge_no;
    int dir = left ? 1 : -1;
    v = start;
    if (left) left_in = 1'b0; else right_in = 1'b0;
    // the pin is released after edge len; the debouncer still shows the
    // button held up to edge len + 2, and the release acts at edge len + 3
    for (edge_no = 1; edge_no <= len + 2; edge_no++) begin
      if (edge_no == len + 1) begin
        if (left) left_in = 1'b1; else right_in = 1'b1;
      end
      cycles(1);
      expv = v;
      if (edge_no >= 3 + HOLD && (edge_no - 3 - HOLD) % REP == 0) begin
        if (v + dir >= 0 && v + dir <= 15) expv = v + dir;
        else if (v + dir > 15) n_sat15++;
        else n_sat0++;
        if (expv != v) begin
          if (edge_no == 3 + HOLD) n_first++; else n_repeat++;
        end
      end
      checks++;
      if (shown() != expv) begin
        failures++;
        $display("FAIL hold %s edge %0d: shown %0d expected %0d", left ? "left" : "right",
                 edge_no, shown(), expv);
      end
      v = shown();
    end
    cycles(3);
    expv = (v + dir > 15) ? 15 : (v + dir < 0) ? 0 : v + dir;
    if (expv != v) n_release++;
    expect_shown(expv, "after release");
  endtask

  initial begin
    cycles(4);
    expect_shown(0, "power-up");
    // short taps: one step each
    repeat (3) begin
      left_in = 1'b0; cycles(4); left_in = 1'b1; cycles(4);
      n_tap++;
    end
    expect_shown(3, "taps");
    // hold left: 3 + HOLD edges then every REP edges; 5 repeats, then release
    hold(1, 3 + HOLD + 4 * REP, 3);      // 3 -> 8, one more in the release delay, release -> 10
    expect_shown(10, "held left");
    hold(1, 3 + HOLD + 10 * REP, 10);    // runs into 15
    expect_shown(15, "held to 15");
    hold(0, 3 + HOLD + 20 * REP, 15);    // runs into 0
    expect_shown(0, "held to 0");
    // long press of both buttons: toggles run only, no steps
    left_in = 1'b0; cycles(2); right_in = 1'b0; cycles(3 * HOLD);
    left_in = 1'b1; right_in = 1'b1; cycles(5);
    n_both++;
    expect_shown(0, "long both");
    checks++;
    if (alarm !== 1'b1) begin failures++; $display("FAIL: run not toggled by long both-press"); end

    checks++;
    if (n_tap == 0 || n_first == 0 || n_repeat == 0 || n_release == 0 || n_sat15 == 0 ||
        n_sat0 == 0 || n_both == 0) begin
      failures++;
      $display("FAIL: coverage tap=%0d first=%0d repeat=%0d release=%0d sat15=%0d sat0=%0d both=%0d",
               n_tap, n_first, n_repeat, n_release, n_sat15, n_sat0, n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000 * DIV) @(posedge clk50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
