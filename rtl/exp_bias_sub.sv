// exp_bias_sub - removes the exponent bias from the exponent sum.
//
// Computes the intermediate result exponent E1 + E2 - BIAS from the 12-bit
// unsigned exponent sum. The result is a signed value one bit wider than the
// sum, because it ranges from -1023 (both exponents zero) to 3071 (both
// 2047); a negative value means an underflow that normalization cannot
// repair, and the exception stage reads the sign for that. Purely
// combinational; the multiplier registers its output in pipeline stage 2.
// The bias of 1023 is the binary64 bias; the signed 13-bit width is this
// design's choice.
module exp_bias_sub #(
  parameter int unsigned IN_W = 12,
  parameter int unsigned BIAS = 1023
) (
  input  logic        [IN_W-1:0] exp_sum,
  output logic signed [IN_W:0]   exp_unbiased
);

  assign exp_unbiased = signed'({1'b0, exp_sum}) - signed'((IN_W+1)'(BIAS));

endmodule
