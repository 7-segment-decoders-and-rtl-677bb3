// Testbench for alarm_logic: all 32 combinations of seconds and run.
module alarm_logic_tb;
  import timer_pkg::*;

  time_t seconds;
  logic  run, alarm;
  int checks = 0, failures = 0;

  alarm_logic dut (.seconds(seconds), .run(run), .alarm(alarm));

  initial begin
    for (int k = 0; k < 32; k++) begin
      seconds = time_t'(k % 16);
      run     = 1'(k / 16);
      #1;
      checks++;
      if (alarm !== (run && k % 16 == 0)) begin
        failures++;
        $display("FAIL: seconds=%0d run=%b alarm=%b", seconds, run, alarm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
