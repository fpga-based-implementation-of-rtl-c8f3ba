// tb_operand_unpack - self-checking testbench of the operand unpack stage.
//
// Applies normal, zero, denormal and Inf/NaN operands and random bit
// patterns, and checks the sign XOR, the exponents, the 53-bit significands
// with their hidden bit and the operand classes against values the
// testbench derives from the raw bit fields. Watchdog as in the other
// testbenches.
module tb_operand_unpack;
  import fpmul_pkg::*;

  logic [63:0] a, b;
  logic        sign;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  opclass_t    ca, cb;
  int checks = 0, failures = 0;
  logic clk = 0;

  operand_unpack dut (.a(a), .b(b), .sign(sign), .exp_a(ea), .exp_b(eb),
                      .mul_a(ma), .mul_b(mb), .cls_a(ca), .cls_b(cb));

  always #5 clk = ~clk;

  function automatic logic [2:0] cls_of(input logic [63:0] x);
    // {zero, denorm, infnan}
    if (x[62:52] == 0) return (x[51:0] == 0) ? 3'b100 : 3'b010;
    if (x[62:52] == 11'h7FF) return 3'b001;
    return 3'b000;
  endfunction

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    logic [52:0] exa, exb;
    a = x; b = y;
    #1;
    exa = {(x[62:52] != 0), x[51:0]};
    exb = {(y[62:52] != 0), y[51:0]};
    checks++;
    if (sign !== (x[63] ^ y[63]) || ea !== x[62:52] || eb !== y[62:52] ||
        ma !== exa || mb !== exb || 3'(ca) !== cls_of(x) || 3'(cb) !== cls_of(y)) begin
      failures++;
      $display("FAIL unpack a=%h b=%h: sign %b ea %h eb %h ma %h mb %h ca %b cb %b",
               x, y, sign, ea, eb, ma, mb, ca, cb);
    end
  endtask

  initial begin
    check(64'h4058C00000000000, 64'hC023800000000000);   // 99, -9.75
    check(64'h0000000000000000, 64'h8000000000000000);   // +0, -0
    check(64'h0000000000000001, 64'h800FFFFFFFFFFFFF);   // denormals
    check(64'h7FF0000000000000, 64'hFFF8000000000000);   // Inf, NaN
    check(64'h0010000000000000, 64'h7FEFFFFFFFFFFFFF);   // min, max normal
    for (int i = 0; i < 3000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 500; i++) begin
      check({$urandom} & 64'h800F_FFFF_FFFF_FFFF, {$urandom, $urandom} | 64'h7FF0_0000_0000_0000);
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
