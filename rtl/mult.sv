// mult - pipelined IEEE-754 double precision floating point multiplier.
//
// Multiplies two binary64 operands a and b and returns fpout = a * b,
// rounded by truncation, with overflow (result +-Infinity) and underflow
// (result +-0) flags. The significands are multiplied by a tiled
// multiplier made of nine small multipliers, each the size of one FPGA DSP
// block, whose partial products are summed in two 17-bit-step cascades and
// one final three-input addition (see tile_mantissa_mul). The exponent path
// runs alongside: a ripple-carry adder sums the exponents, the bias is
// subtracted, and after normalization the exponent is updated and checked.
//
// Pipeline, seven register stages, one operation accepted per clock:
//   1  operands unpacked: sign XOR, exponent sum, 53-bit significands,
//      operand classes
//   2  exponent bias removed; nine tile products
//   3-5 cascade summation of S0 and S1 (exponent and sign delayed)
//   6  106-bit significand product
//   7  normalization, truncation, exponent update, overflow/underflow,
//      result register
// The result for operands presented before clock edge k appears on fpout
// after edge k+6, i.e. a latency of seven clock cycles. All registers load
// only while enable is high, so enable low freezes the whole pipeline
// (operands in flight are kept, not lost). rst is synchronous and active
// high; it clears every register and marks every pipeline slot as a
// multiplication by zero, so fpout reads +0 with both flags low until the
// first real result arrives.
//
// The port list, the seven-cycle latency, the operation split (sign XOR,
// exponent addition, bias subtraction, tiled significand multiplication,
// normalization, update of the exponent, truncation, overflow/underflow)
// follow the design. The exact stage boundaries, enable acting as a clock
// enable, the synchronous reset and the treatment of zero and Inf/NaN
// operands are this implementation's choices.
module mult
  import fpmul_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] fpout,
  output logic        overflow,
  output logic        underflow
);

  // A reset pipeline slot is marked as a zero operand, so that it leaves
  // the pipeline as +0 with both flags low.
  localparam opclass_t CLS_EMPTY = '{zero: 1'b1, denorm: 1'b0, infnan: 1'b0};

  // ---------------------------------------------------------- stage 1
  logic             sign_c;
  logic [EXP_W-1:0] exp_a_c, exp_b_c;
  logic [SIG_W-1:0] mul_a_c, mul_b_c;
  opclass_t         cls_a_c, cls_b_c;
  logic [EXPS_W-1:0] exp_sum_c;

  operand_unpack u_unpack (
    .a(a), .b(b), .sign(sign_c), .exp_a(exp_a_c), .exp_b(exp_b_c),
    .mul_a(mul_a_c), .mul_b(mul_b_c), .cls_a(cls_a_c), .cls_b(cls_b_c)
  );

  adder1 #(.WIDTH(EXPS_W)) u_adder1 (
    .DataA({1'b0, exp_a_c}), .DataB({1'b0, exp_b_c}), .Result(exp_sum_c)
  );

  logic              sign_q1;
  logic [SIG_W-1:0]  mul_a, mul_b;
  opclass_t          cls_a_q1, cls_b_q1;
  logic [EXPS_W-1:0] exponent_initial;

  always_ff @(posedge clk) begin
    if (rst) begin
      sign_q1 <= 1'b0; mul_a <= '0; mul_b <= '0;
      cls_a_q1 <= CLS_EMPTY; cls_b_q1 <= CLS_EMPTY; exponent_initial <= '0;
    end else if (enable) begin
      sign_q1          <= sign_c;
      mul_a            <= mul_a_c;
      mul_b            <= mul_b_c;
      cls_a_q1         <= cls_a_c;
      cls_b_q1         <= cls_b_c;
      exponent_initial <= exp_sum_c;
    end
  end

  // ------------------------------------------------- stages 2 to 6
  logic [PROD_W-1:0] product;

  tile_mantissa_mul u_mant (
    .clk(clk), .rst(rst), .enable(enable),
    .mul_a(mul_a), .mul_b(mul_b), .product(product)
  );

  logic signed [EXPI_W-1:0] exp_unbiased_c;

  exp_bias_sub #(.IN_W(EXPS_W), .BIAS(BIAS)) u_bias (
    .exp_sum(exponent_initial), .exp_unbiased(exp_unbiased_c)
  );

  // Side information travelling with the significand product. Entry 0 is
  // stage 2; entry 4 lines up with the product register (stage 6).
  typedef struct packed {
    logic                     sign;
    logic signed [EXPI_W-1:0] exp_unbiased;
    opclass_t                 cls_a;
    opclass_t                 cls_b;
  } side_t;

  localparam int unsigned SIDE_DEPTH = LATENCY - 2;
  side_t side_q [SIDE_DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < SIDE_DEPTH; i++)
        side_q[i] <= '{sign: 1'b0, exp_unbiased: '0, cls_a: CLS_EMPTY, cls_b: CLS_EMPTY};
    end else if (enable) begin
      side_q[0] <= '{sign: sign_q1, exp_unbiased: exp_unbiased_c,
                     cls_a: cls_a_q1, cls_b: cls_b_q1};
      for (int i = 1; i < SIDE_DEPTH; i++) side_q[i] <= side_q[i-1];
    end
  end

  // ---------------------------------------------------------- stage 7
  logic [FRAC_W-1:0] frac_c;
  logic              norm_shift_c;
  logic [63:0]       fpout_c;
  logic              overflow_c, underflow_c;

  normalize_round u_norm (
    .product(product), .frac(frac_c), .norm_shift(norm_shift_c)
  );

  exc_update u_exc (
    .sign(side_q[SIDE_DEPTH-1].sign),
    .exp_unbiased(side_q[SIDE_DEPTH-1].exp_unbiased),
    .norm_shift(norm_shift_c), .frac(frac_c),
    .cls_a(side_q[SIDE_DEPTH-1].cls_a), .cls_b(side_q[SIDE_DEPTH-1].cls_b),
    .fpout(fpout_c), .overflow(overflow_c), .underflow(underflow_c)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      fpout <= '0; overflow <= 1'b0; underflow <= 1'b0;
    end else if (enable) begin
      fpout <= fpout_c; overflow <= overflow_c; underflow <= underflow_c;
    end
  end

  // The two flags exclude each other, and each forces its special result.
  a_flags_exclusive: assert property (@(posedge clk) !(overflow && underflow));
  a_overflow_inf:    assert property (@(posedge clk) overflow |-> fpout[62:0] == {11'h7FF, 52'd0});
  a_underflow_zero:  assert property (@(posedge clk) underflow |-> fpout[62:0] == '0);

endmodule
