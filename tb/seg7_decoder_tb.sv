// Testbench for seg7_decoder: the expected pattern of each digit is built
// per segment, from the list of hexadecimal digits that light it, and
// compared with the active-low output for all sixteen values.
module seg7_decoder_tb;
  import timer_pkg::*;

  time_t value;
  seg_t  seg_n;
  int checks = 0, failures = 0;

  seg7_decoder dut (.value(value), .seg_n(seg_n));

  // Bit k of each mask is set when digit k lights that segment.
  //                  FEDCBA9876543210
  localparam logic [15:0] SEG_A = 16'b1101011111101101;
  localparam logic [15:0] SEG_B = 16'b0010011110011111;
  localparam logic [15:0] SEG_C = 16'b0010111111111011;
  localparam logic [15:0] SEG_D = 16'b0111101101101101;
  localparam logic [15:0] SEG_E = 16'b1111110101000101;
  localparam logic [15:0] SEG_F = 16'b1101111101110001;
  localparam logic [15:0] SEG_G = 16'b1110111101111100;

  initial begin
    for (int k = 0; k < 16; k++) begin
      seg_t lit;
      value = time_t'(k);
      #1;
      lit = {1'b0, SEG_A[k], SEG_B[k], SEG_C[k], SEG_D[k], SEG_E[k], SEG_F[k], SEG_G[k]};
      checks++;
      if (seg_n !== ~lit) begin
        failures++;
        $display("FAIL: digit %0h seg_n=%b expected %b", k, seg_n, ~lit);
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
