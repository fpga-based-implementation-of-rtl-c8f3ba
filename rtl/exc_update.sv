// exc_update - exponent update, overflow/underflow detection, result packing.
//
// Adds the normalization shift to the signed intermediate exponent
// E1 + E2 - 1023 and classifies the result:
//   final exponent <= 0     underflow: result is +-0, underflow = 1
//                           (an intermediate exponent of -1 or below can
//                           never be repaired; exactly 0 is repaired when
//                           the normalization shift adds 1)
//   1 .. 2046               normal result {sign, exponent, fraction}
//   final exponent >= 2047  overflow: result is +-Infinity, overflow = 1
//                           (2046 + shift is an overflow caused by
//                           normalization)
// Operand classes override the arithmetic, in this order: an Inf/NaN
// operand gives +-Infinity with overflow = 1; a denormal operand gives +-0
// with underflow = 1; a zero operand gives +-0 with no flag. The sign is
// always the XOR of the operand signs. Purely combinational. The exponent
// ranges, the +-Inf/+-0 results and the flushing of denormals to zero with
// an underflow flag follow the design; the handling of zero and Inf/NaN
// operands is this design's own choice.
module exc_update
  import fpmul_pkg::*;
(
  input  logic                     sign,
  input  logic signed [EXPI_W-1:0] exp_unbiased,
  input  logic                     norm_shift,
  input  logic [FRAC_W-1:0]        frac,
  input  opclass_t                 cls_a,
  input  opclass_t                 cls_b,
  output logic [63:0]              fpout,
  output logic                     overflow,
  output logic                     underflow
);

  logic signed [EXPI_W-1:0] exp_final;
  fp64_t                    res;

  always_comb begin
    exp_final = exp_unbiased + signed'(EXPI_W'(norm_shift));
    overflow  = 1'b0;
    underflow = 1'b0;
    res.sign  = sign;
    res.exp   = exp_final[EXP_W-1:0];
    res.frac  = frac;
    if (cls_a.infnan || cls_b.infnan) begin
      overflow = 1'b1;
      res.exp  = '1;
      res.frac = '0;
    end else if (cls_a.denorm || cls_b.denorm) begin
      underflow = 1'b1;
      res.exp   = '0;
      res.frac  = '0;
    end else if (cls_a.zero || cls_b.zero) begin
      res.exp  = '0;
      res.frac = '0;
    end else if (exp_final <= 0) begin
      underflow = 1'b1;
      res.exp   = '0;
      res.frac  = '0;
    end else if (exp_final > signed'(EXPI_W'(EXP_MAX_NORMAL))) begin
      overflow = 1'b1;
      res.exp  = '1;
      res.frac = '0;
    end
    fpout = res;
  end

endmodule
