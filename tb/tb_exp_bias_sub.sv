// tb_exp_bias_sub - self-checking testbench of the bias subtractor.
//
// Applies exponent sums from 0 to 4095 (every 12-bit value) and checks that
// the signed output equals the sum minus 1023, including the negative
// results that signal an uncompensated underflow. Watchdog as in the other
// testbenches.
module tb_exp_bias_sub;

  logic [11:0]        sum;
  logic signed [12:0] unb;
  int checks = 0, failures = 0;
  logic clk = 0;

  exp_bias_sub dut (.exp_sum(sum), .exp_unbiased(unb));

  always #5 clk = ~clk;

  initial begin
    for (int s = 0; s < 4096; s++) begin
      sum = 12'(s);
      #1;
      checks++;
      if (int'(unb) != s - 1023) begin
        failures++;
        $display("FAIL bias %0d: got %0d expected %0d", s, unb, s - 1023);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
