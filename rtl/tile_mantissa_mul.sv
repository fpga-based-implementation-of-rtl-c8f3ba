// tile_mantissa_mul - 53 x 53 -> 106-bit significand multiplier by tiling.
//
// The 53 x 53 partial-product board is covered by nine rectangular tiles,
// each small enough for one FPGA DSP multiplier (at most 24 x 17 unsigned):
//
//   M1 = a[23:0]  x b[16:0]  (41 b)    M8 = a[40:24] x b[23:0]  (41 b)
//   M2 = a[23:0]  x b[33:17] (41 b)    M7 = a[52:41] x b[23:0]  (36 b)
//   M3 = a[16:0]  x b[52:34] (36 b)    M6 = a[52:34] x b[40:24] (36 b)
//   M4 = a[33:17] x b[52:34] (36 b)    M5 = a[52:34] x b[52:41] (31 b)
//   M0 = a[33:24] x b[33:24] (20 b)
//
// and the product is
//   A*B = S0 + 2^24 S1 + 2^48 M0, with
//   S0  = M1 + 2^17 M2 + 2^34 M3 + 2^51 M4   (87 bits)
//   S1  = M8 + 2^17 M7 + 2^34 M6 + 2^51 M5   (82 bits).
// Because the steps inside S0 and S1 are all 17 bits, each sub-sum is built
// the way a DSP post-adder cascade builds it: every step adds the next tile
// to the previous partial sum shifted right by 17, and the 17 bits shifted
// out are final bits of the sum. Only the last addition of S0, S1 and M0 is
// a wide adder outside the cascade.
//
// Pipeline (every register loads only while enable is high; rst clears):
//   stage 1  nine tile products
//   stage 2  s01 = M2 + (M1 >> 17),  s11 = M7 + (M8 >> 17)
//   stage 3  s02 = M3 + (s01 >> 17), s12 = M6 + (s11 >> 17)
//   stage 4  s03 = M4 + (s02 >> 17), s13 = M5 + (s12 >> 17)
//   stage 5  product = S0 + 2^24 S1 + 2^48 M0
// so product follows mul_a/mul_b by 5 enabled clock edges, one new
// operand pair accepted per edge. The tiles, their order in S0 and S1, the
// 17-bit right-shift summation and the three final additions follow the
// design; splitting the chain into exactly these five register stages is
// this implementation's choice, made to give the multiplier its seven-cycle
// latency overall.
module tile_mantissa_mul
  import fpmul_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic [SIG_W-1:0]  mul_a,
  input  logic [SIG_W-1:0]  mul_b,
  output logic [PROD_W-1:0] product
);

  localparam int unsigned SH = CASCADE_SHIFT;

  // ---------------------------------------------------------------- tiles
  logic [40:0] m1_c, m2_c, m8_c;
  logic [35:0] m3_c, m4_c, m6_c, m7_c;
  logic [30:0] m5_c;
  logic [19:0] m0_c;

  comb_multiplier #(.AW(24), .BW(17)) u_m1 (.DataA(mul_a[23:0]),  .DataB(mul_b[16:0]),  .Result(m1_c));
  comb_multiplier #(.AW(24), .BW(17)) u_m2 (.DataA(mul_a[23:0]),  .DataB(mul_b[33:17]), .Result(m2_c));
  comb_multiplier #(.AW(17), .BW(19)) u_m3 (.DataA(mul_a[16:0]),  .DataB(mul_b[52:34]), .Result(m3_c));
  comb_multiplier #(.AW(17), .BW(19)) u_m4 (.DataA(mul_a[33:17]), .DataB(mul_b[52:34]), .Result(m4_c));
  comb_multiplier #(.AW(19), .BW(12)) u_m5 (.DataA(mul_a[52:34]), .DataB(mul_b[52:41]), .Result(m5_c));
  comb_multiplier #(.AW(19), .BW(17)) u_m6 (.DataA(mul_a[52:34]), .DataB(mul_b[40:24]), .Result(m6_c));
  comb_multiplier #(.AW(12), .BW(24)) u_m7 (.DataA(mul_a[52:41]), .DataB(mul_b[23:0]),  .Result(m7_c));
  comb_multiplier #(.AW(17), .BW(24)) u_m8 (.DataA(mul_a[40:24]), .DataB(mul_b[23:0]),  .Result(m8_c));
  comb_multiplier #(.AW(10), .BW(10)) u_m0 (.DataA(mul_a[33:24]), .DataB(mul_b[33:24]), .Result(m0_c));

  // Stage 1: registered tile products.
  logic [40:0] product_m1, product_m2, product_m8;
  logic [35:0] product_m3, product_m4, product_m6, product_m7;
  logic [30:0] product_m5;
  logic [19:0] product_m0;

  always_ff @(posedge clk) begin
    if (rst) begin
      product_m1 <= '0; product_m2 <= '0; product_m3 <= '0;
      product_m4 <= '0; product_m5 <= '0; product_m6 <= '0;
      product_m7 <= '0; product_m8 <= '0; product_m0 <= '0;
    end else if (enable) begin
      product_m1 <= m1_c; product_m2 <= m2_c; product_m3 <= m3_c;
      product_m4 <= m4_c; product_m5 <= m5_c; product_m6 <= m6_c;
      product_m7 <= m7_c; product_m8 <= m8_c; product_m0 <= m0_c;
    end
  end

  // Stage 2: first cascade step of S0 and S1.
  logic [41:0] s01;                 // M2 + (M1 >> 17)
  logic [36:0] s11;                 // M7 + (M8 >> 17)
  logic [SH-1:0] s0_b0, s1_b0;      // bits 16:0 of S0 and S1
  logic [35:0] m3_q2, m4_q2, m6_q2;
  logic [30:0] m5_q2;
  logic [19:0] m0_q2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s01 <= '0; s11 <= '0; s0_b0 <= '0; s1_b0 <= '0;
      m3_q2 <= '0; m4_q2 <= '0; m5_q2 <= '0; m6_q2 <= '0; m0_q2 <= '0;
    end else if (enable) begin
      s01   <= 42'(product_m2) + 42'(product_m1[40:SH]);
      s11   <= 37'(product_m7) + 37'(product_m8[40:SH]);
      s0_b0 <= product_m1[SH-1:0];
      s1_b0 <= product_m8[SH-1:0];
      m3_q2 <= product_m3; m4_q2 <= product_m4;
      m5_q2 <= product_m5; m6_q2 <= product_m6;
      m0_q2 <= product_m0;
    end
  end

  // Stage 3: second cascade step.
  logic [36:0] s02;                 // M3 + (s01 >> 17)
  logic [36:0] s12;                 // M6 + (s11 >> 17)
  logic [2*SH-1:0] s0_b1, s1_b1;    // bits 33:0 of S0 and S1
  logic [35:0] m4_q3;
  logic [30:0] m5_q3;
  logic [19:0] m0_q3;

  always_ff @(posedge clk) begin
    if (rst) begin
      s02 <= '0; s12 <= '0; s0_b1 <= '0; s1_b1 <= '0;
      m4_q3 <= '0; m5_q3 <= '0; m0_q3 <= '0;
    end else if (enable) begin
      s02   <= 37'(m3_q2) + 37'(s01[41:SH]);
      s12   <= 37'(m6_q2) + 37'(s11[36:SH]);
      s0_b1 <= {s01[SH-1:0], s0_b0};
      s1_b1 <= {s11[SH-1:0], s1_b0};
      m4_q3 <= m4_q2; m5_q3 <= m5_q2; m0_q3 <= m0_q2;
    end
  end

  // Stage 4: last cascade step; S0 and S1 complete.
  logic [S0_W-1:0] s0;
  logic [S1_W-1:0] s1;
  logic [19:0]     m0_q4;
  logic [35:0]     s03_c;           // M4 + (s02 >> 17)
  logic [30:0]     s13_c;           // M5 + (s12 >> 17)

  // s03 and s13 never exceed 36 and 31 significant bits: S0 is a
  // 53 x 34-bit product (87 bits) and S1 a 29 x 53-bit one (82 bits).
  assign s03_c = m4_q3 + 36'(s02[36:SH]);
  assign s13_c = m5_q3 + 31'(s12[36:SH]);

  always_ff @(posedge clk) begin
    if (rst) begin
      s0 <= '0; s1 <= '0; m0_q4 <= '0;
    end else if (enable) begin
      s0    <= {s03_c, s02[SH-1:0], s0_b1};
      s1    <= {s13_c, s12[SH-1:0], s1_b1};
      m0_q4 <= m0_q3;
    end
  end

  // Stage 5: product = S0 + 2^24 S1 + 2^48 M0. The low 24 bits of S0 pass
  // straight through; the rest is S1 + (S0 >> 24) + 2^24 M0, which fits
  // 82 bits because the whole product fits 106.
  logic [81:0] sums0s1;
  logic [81:0] sums0s1m0;

  assign sums0s1   = s1 + 82'(s0[S0_W-1:S1_OFFSET]);
  assign sums0s1m0 = sums0s1 + (82'(m0_q4) << (M0_OFFSET - S1_OFFSET));

  always_ff @(posedge clk) begin
    if (rst)
      product <= '0;
    else if (enable)
      product <= {sums0s1m0, s0[S1_OFFSET-1:0]};
  end

endmodule
