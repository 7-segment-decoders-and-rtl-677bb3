// Testbench for clk_debounce: random input sequence, the output must equal
// the input sampled two clock edges earlier, and must be 0 in reset.
module clk_debounce_tb;
  logic clk = 1'b0, rst = 1'b1, btn_in = 1'b0, btn_out;
  logic [2:0] hist = '0;  // input as sampled at the last three edges
  int checks = 0, failures = 0;

  clk_debounce dut (.clk(clk), .rst(rst), .btn_in(btn_in), .btn_out(btn_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (btn_out !== 1'b0) begin failures++; $display("FAIL: not 0 in reset"); end
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      btn_in = 1'($urandom_range(0, 1));
      @(posedge clk);
      hist = {hist[1:0], btn_in};
      #1;
      if (i >= 2) begin
        checks++;
        if (btn_out !== hist[1]) begin
          failures++;
          $display("FAIL: cycle %0d out=%b expected %b", i, btn_out, hist[1]);
        end
      end
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
