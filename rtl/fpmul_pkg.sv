// fpmul_pkg - shared types and constants of the double precision multiplier.
//
// Holds the IEEE-754 binary64 field layout (1 sign bit, 11 exponent bits,
// 52 stored fraction bits, 53-bit significand with the hidden '1'), the
// exponent bias of 1023, and the bit ranges of the nine multiplier tiles
// M0..M8 that cover the 53 x 53 significand product board. The tile ranges
// and the 17/24/48-bit offsets are those of the tiling the multiplier is
// built on; the widths of the intermediate exponent are this design's own
// choice (13 signed bits, enough for -1023..3071).
package fpmul_pkg;

  localparam int unsigned SIG_W  = 53;          // significand incl. hidden bit
  localparam int unsigned FRAC_W = 52;          // stored fraction
  localparam int unsigned EXP_W  = 11;          // exponent field
  localparam int unsigned PROD_W = 2 * SIG_W;   // 106-bit significand product
  localparam int unsigned EXPS_W = EXP_W + 1;   // exponent sum, 12 bits
  localparam int unsigned EXPI_W = EXP_W + 2;   // signed intermediate exponent
  localparam int unsigned BIAS   = 1023;
  localparam int unsigned EXP_MAX_NORMAL = 2046;

  // Number of clock enables from operands sampled to result visible.
  localparam int unsigned LATENCY = 7;

  // Tile offsets on the A axis and B axis. Tile Mk multiplies
  // a[A_HI:A_LO] by b[B_HI:B_LO] and carries weight 2^(A_LO + B_LO).
  //   M1 = a[23:0]  x b[16:0]     M8 = a[40:24] x b[23:0]
  //   M2 = a[23:0]  x b[33:17]    M7 = a[52:41] x b[23:0]
  //   M3 = a[16:0]  x b[52:34]    M6 = a[52:34] x b[40:24]
  //   M4 = a[33:17] x b[52:34]    M5 = a[52:34] x b[52:41]
  //   M0 = a[33:24] x b[33:24]
  localparam int unsigned CASCADE_SHIFT = 17;   // step inside S0 and S1
  localparam int unsigned S1_OFFSET     = 24;   // weight of S1
  localparam int unsigned M0_OFFSET     = 48;   // weight of M0
  localparam int unsigned S0_W = 87;            // width of S0 (86:0)
  localparam int unsigned S1_W = 82;            // width of S1 (81:0)

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  // Operand classes reported by the unpack stage.
  typedef struct packed {
    logic zero;      // exponent 0, fraction 0
    logic denorm;    // exponent 0, fraction non-zero
    logic infnan;    // exponent 2047
  } opclass_t;

endpackage
