// tb_normalize_round - self-checking testbench of normalization and
// truncation.
//
// Builds 106-bit significand products as exact products of two random
// 53-bit significands with the hidden bit set, so both the 1.x and the 1x.x
// case occur, plus hand-made products. The expected fraction is found by the
// testbench from the position of the leading one, without the module's
// index arithmetic: shift the product left until bit 105 is set, then keep
// bits 104:53. Watchdog as in the other testbenches.
module tb_normalize_round;

  logic [105:0] product;
  logic [51:0]  frac;
  logic         shift;
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0;
  logic clk = 0;

  normalize_round dut (.product(product), .frac(frac), .norm_shift(shift));

  always #5 clk = ~clk;

  task automatic check(input logic [105:0] p);
    logic [105:0] q;
    logic         exp_shift;
    q = p;
    exp_shift = 1'b1;
    if (!q[105]) begin q = q << 1; exp_shift = 1'b0; end
    product = p;
    #1;
    checks++;
    if (shift) n_shift++; else n_noshift++;
    if (frac !== q[104:53] || shift !== exp_shift) begin
      failures++;
      $display("FAIL norm %h: frac %h shift %b expected %h %b", p, frac, shift, q[104:53], exp_shift);
    end
  endtask

  initial begin
    logic [52:0] x, y;
    check({2'b01, 104'd0});                         // 1.0
    check({2'b11, 104'd0});                         // 3.0
    check({2'b01, {104{1'b1}}});                    // just below 2
    check({2'b10, 52'hA5A5A5A5A5A5A, 52'h1});       // shifted, low bit lost
    for (int i = 0; i < 3000; i++) begin
      x = {1'b1, 20'($urandom), $urandom};
      y = {1'b1, 20'($urandom), $urandom};
      check(106'(x) * 106'(y));
    end
    if (n_shift == 0 || n_noshift == 0) begin
      failures++;
      $display("FAIL one normalization case never occurred");
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
