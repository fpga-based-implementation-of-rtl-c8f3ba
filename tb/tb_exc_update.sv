// tb_exc_update - self-checking testbench of the exponent update and the
// overflow/underflow rules.
//
// Sweeps the intermediate exponent over its whole range -1023..3071 with
// both values of the normalization shift and random fractions and signs,
// and checks the packed result and the flags against the rules: final
// exponent <= 0 gives +-0 and underflow, >= 2047 gives +-Inf and overflow,
// anything else the packed number. Also checks zero, denormal and Inf/NaN
// operand classes. Watchdog as in the other testbenches.
module tb_exc_update;
  import fpmul_pkg::*;

  logic               sign, shift, ovf, unf;
  logic signed [12:0] eu;
  logic [51:0]        frac;
  opclass_t           ca, cb;
  logic [63:0]        fpout;
  int checks = 0, failures = 0;
  logic clk = 0;

  exc_update dut (.sign(sign), .exp_unbiased(eu), .norm_shift(shift), .frac(frac),
                  .cls_a(ca), .cls_b(cb), .fpout(fpout), .overflow(ovf), .underflow(unf));

  always #5 clk = ~clk;

  task automatic check(input logic s, input int e, input logic sh, input logic [51:0] f,
                       input logic [2:0] cla, input logic [2:0] clb);
    logic [63:0] ef;
    logic        eo, eun;
    int          efin;
    sign = s; eu = 13'(e); shift = sh; frac = f; ca = opclass_t'(cla); cb = opclass_t'(clb);
    #1;
    efin = e + int'(sh);
    eo = 0; eun = 0;
    if (cla[0] || clb[0])      begin ef = {s, 11'h7FF, 52'd0}; eo = 1; end
    else if (cla[1] || clb[1]) begin ef = {s, 63'd0}; eun = 1; end
    else if (cla[2] || clb[2]) begin ef = {s, 63'd0}; end
    else if (efin < 1)         begin ef = {s, 63'd0}; eun = 1; end
    else if (efin > 2046)      begin ef = {s, 11'h7FF, 52'd0}; eo = 1; end
    else                       ef = {s, 11'(efin), f};
    checks++;
    if (fpout !== ef || ovf !== eo || unf !== eun) begin
      failures++;
      $display("FAIL exc e=%0d sh=%b cls=%b/%b: got %h o%b u%b expected %h o%b u%b",
               e, sh, cla, clb, fpout, ovf, unf, ef, eo, eun);
    end
  endtask

  initial begin
    for (int e = -1023; e <= 3071; e++) begin
      check(1'($urandom), e, 1'b0, {20'($urandom), $urandom}, 3'b000, 3'b000);
      check(1'($urandom), e, 1'b1, {20'($urandom), $urandom}, 3'b000, 3'b000);
    end
    for (int i = 0; i < 500; i++) begin
      check(1'($urandom), int'($urandom_range(0, 4094)) - 1023, 1'($urandom),
            {20'($urandom), $urandom}, 3'($urandom) & 3'($urandom), 3'($urandom) & 3'($urandom));
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
