// Full-size testbench for kitchen_timer: every parameter at its default
// (50 MHz board clock divided by 500 000 to 100 Hz, 100 cycles per second).
//
// One complete use of the timer through the pins: after power-up the
// display shows 0; two left-button taps set 2; pressing and releasing both
// buttons starts it; it counts 2, 1, 0 at one step per second (checked in
// 100 Hz cycles, and the 100 Hz period in board-clock cycles), the alarm
// comes on at 0, and pressing both buttons again stops it and silences the
// alarm. The displayed digit is decoded from the segment pins with
// patterns built independently here.
module kitchen_timer_full_tb;
  timeunit 1ns; timeprecision 1ps;
  logic clk50 = 1'b0;
  logic left_in = 1'b1, right_in = 1'b1;
  logic a, b, c, d, e, f, g, dp, com, alarm;
  int checks = 0, failures = 0;

  kitchen_timer dut (
    .clk50(clk50), .left_in(left_in), .right_in(right_in),
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .g(g), .dp(dp),
    .com(com), .alarm(alarm));

  always #10 clk50 = ~clk50;  // 50 MHz

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

  task automatic expect_state(int secs, logic al, string what);
    checks++;
    if (shown() != secs || alarm !== al || dp !== 1'b1 || com !== 1'b1) begin
      failures++;
      $display("FAIL %s: shown=%0d expected %0d, alarm=%b expected %b", what, shown(), secs, alarm, al);
    end
  endtask

  task automatic cycles(int n);
    repeat (n) @(posedge dut.clk);
    #1;
  endtask

  time t0, t1;
  int  last, last_change, steps;

  initial begin
    @(posedge dut.clk); t0 = $time;
    @(posedge dut.clk); t1 = $time;
    checks++;
    if (t1 - t0 != 64'(500_000 * 20)) begin
      failures++;
      $display("FAIL: 100 Hz period %0t, expected 10 ms", t1 - t0);
    end
    cycles(3);
    expect_state(0, 1'b0, "power-up");

    repeat (2) begin
      left_in = 1'b0; cycles(3); left_in = 1'b1; cycles(4);
    end
    expect_state(2, 1'b0, "set");

    left_in = 1'b0; cycles(2); right_in = 1'b0; cycles(3);
    left_in = 1'b1; cycles(1); right_in = 1'b1; cycles(4);
    expect_state(2, 1'b0, "started");

    last = 2; last_change = 0; steps = 0;
    for (int cyc = 1; cyc <= 260; cyc++) begin
      cycles(1);
      if (shown() != last) begin
        checks++;
        if (shown() != last - 1 || (last_change != 0 && cyc - last_change != 100)) begin
          failures++;
          $display("FAIL: step %0d -> %0d after %0d cycles", last, shown(), cyc - last_change);
        end
        last = shown(); last_change = cyc; steps++;
      end
    end
    checks++;
    if (steps != 2) begin failures++; $display("FAIL: %0d countdown steps", steps); end
    expect_state(0, 1'b1, "alarm");

    right_in = 1'b0; cycles(2); left_in = 1'b0; cycles(3);
    right_in = 1'b1; left_in = 1'b1; cycles(4);
    expect_state(0, 1'b0, "stopped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 6 s of simulated time
  initial begin
    #(64'd6_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
