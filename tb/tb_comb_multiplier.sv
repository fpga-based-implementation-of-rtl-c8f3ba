// tb_comb_multiplier - self-checking testbench of the unsigned tile
// multiplier.
//
// Checks the default 19 x 17 instance and a 24 x 17 instance (the largest
// tile) against products computed by the testbench in 64-bit arithmetic,
// with all-ones corners and random operands. Watchdog as in the other
// testbenches.
module tb_comb_multiplier;

  logic [18:0] a19;
  logic [16:0] b17;
  logic [35:0] r36;
  logic [23:0] a24;
  logic [16:0] c17;
  logic [40:0] r41;
  int checks = 0, failures = 0;
  logic clk = 0;

  comb_multiplier dut_def (.DataA(a19), .DataB(b17), .Result(r36));
  comb_multiplier #(.AW(24), .BW(17)) dut_24 (.DataA(a24), .DataB(c17), .Result(r41));

  always #5 clk = ~clk;

  task automatic check(input logic [18:0] x, input logic [16:0] y,
                       input logic [23:0] u, input logic [16:0] v);
    longint unsigned e1, e2;
    a19 = x; b17 = y; a24 = u; c17 = v;
    #1;
    e1 = longint'(x) * longint'(y);
    e2 = longint'(u) * longint'(v);
    checks += 2;
    if (64'(r36) != e1) begin
      failures++;
      $display("FAIL 19x17 %0d*%0d got %0d expected %0d", x, y, r36, e1);
    end
    if (64'(r41) != e2) begin
      failures++;
      $display("FAIL 24x17 %0d*%0d got %0d expected %0d", u, v, r41, e2);
    end
  endtask

  initial begin
    check('1, '1, '1, '1);
    check(0, '1, '1, 0);
    check(1, 1, 1, 1);
    check(19'h63000, 17'h09C00, 24'h800000, 17'h10000);
    for (int i = 0; i < 3000; i++)
      check(19'($urandom), 17'($urandom), 24'($urandom), 17'($urandom));
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
