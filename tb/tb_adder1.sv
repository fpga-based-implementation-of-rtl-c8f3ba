// tb_adder1 - self-checking testbench of the ripple-carry exponent adder.
//
// Drives adder1 at its default 12-bit width with corner values and random
// pairs of 11-bit exponents (zero-extended, as the multiplier uses it) and
// of full 12-bit values, and compares Result with the sum modulo 2^12
// worked out by the testbench. A watchdog ends the run after a fixed number
// of clock cycles and counts that as a failure.
module tb_adder1;

  localparam int unsigned W = 12;

  logic [W-1:0] da, db, res;
  int checks = 0, failures = 0;
  logic clk = 0;

  adder1 #(.WIDTH(W)) dut (.DataA(da), .DataB(db), .Result(res));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] expect_sum;
    da = x; db = y;
    #1;
    expect_sum = W'((int'(x) + int'(y)) % (1 << W));
    checks++;
    if (res !== expect_sum) begin
      failures++;
      $display("FAIL adder1 %0d + %0d: got %0d expected %0d", x, y, res, expect_sum);
    end
  endtask

  initial begin
    check(0, 0);
    check(12'd1029, 12'd1026);          // 2055, exponent sum of 99 * -9.75
    check(12'd2047, 12'd2047);
    check(12'd2046, 12'd1);
    check(12'hFFF, 12'd1);              // carry ripples through every bit
    check(12'hAAA, 12'h555);
    for (int i = 0; i < 2000; i++) check({1'b0, 11'($urandom)}, {1'b0, 11'($urandom)});
    for (int i = 0; i < 2000; i++) check(W'($urandom), W'($urandom));
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
