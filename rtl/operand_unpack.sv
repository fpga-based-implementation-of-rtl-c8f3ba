// operand_unpack - splits the two binary64 operands for the multiplier.
//
// Computes the result sign as the XOR of the operand signs, passes the two
// 11-bit exponents on, and forms the 53-bit significands mul_a and mul_b by
// placing the hidden '1' in front of each 52-bit fraction (for an operand
// with exponent 0 the hidden bit is '0'). It also classifies each operand:
// zero (exponent and fraction 0), denormal (exponent 0, fraction non-zero)
// and Inf/NaN (exponent 2047), and reports the classes of both operands.
// Purely combinational; the multiplier registers the outputs in pipeline
// stage 1. Sign XOR and the hidden-bit significands follow the design; the
// operand classes are this design's way of feeding its special-case rules
// (see exc_update).
module operand_unpack
  import fpmul_pkg::*;
(
  input  logic [63:0]       a,
  input  logic [63:0]       b,
  output logic              sign,
  output logic [EXP_W-1:0]  exp_a,
  output logic [EXP_W-1:0]  exp_b,
  output logic [SIG_W-1:0]  mul_a,
  output logic [SIG_W-1:0]  mul_b,
  output opclass_t          cls_a,
  output opclass_t          cls_b
);

  fp64_t fa, fb;

  always_comb begin
    fa    = fp64_t'(a);
    fb    = fp64_t'(b);
    sign  = fa.sign ^ fb.sign;
    exp_a = fa.exp;
    exp_b = fb.exp;
    mul_a = {(fa.exp != '0), fa.frac};
    mul_b = {(fb.exp != '0), fb.frac};
    cls_a.zero   = (fa.exp == '0) && (fa.frac == '0);
    cls_a.denorm = (fa.exp == '0) && (fa.frac != '0);
    cls_a.infnan = (fa.exp == '1);
    cls_b.zero   = (fb.exp == '0) && (fb.frac == '0);
    cls_b.denorm = (fb.exp == '0) && (fb.frac != '0);
    cls_b.infnan = (fb.exp == '1);
  end

endmodule
