// normalize_round - normalizes the significand product and rounds it.
//
// The product of two significands in [1,2) lies in [1,4), so its 106-bit
// form is either 01.xxx or 1x.xxx. When bit 105 is set the binary point
// moves one place left: the fraction is product[104:53] and norm_shift tells
// the exponent update to add 1. Otherwise the fraction is product[103:52]
// and norm_shift is 0. The result is rounded to 52 fraction bits by
// truncation (round toward zero): the 52 or 53 bits below the kept fraction
// are dropped. Purely combinational. The one-place normalization and the
// truncation rounding follow the design.
module normalize_round
  import fpmul_pkg::*;
(
  input  logic [PROD_W-1:0] product,
  output logic [FRAC_W-1:0] frac,
  output logic              norm_shift
);

  always_comb begin
    norm_shift = product[PROD_W-1];
    if (norm_shift)
      frac = product[PROD_W-2 -: FRAC_W];
    else
      frac = product[PROD_W-3 -: FRAC_W];
  end

endmodule
