// comb_multiplier - unsigned tile multiplier.
//
// Multiplies an AW-bit unsigned DataA by a BW-bit unsigned DataB and returns
// the full AW+BW-bit product in Result. It is the unit each tile of the
// significand multiplier is made of; every instance fits one FPGA DSP
// multiplier (25 x 18 signed, so up to 24 x 17 unsigned, or 19 x 17 as in
// the default). Purely combinational; the caller registers the product. The
// default size 19 x 17 -> 36 bits is that of the tile multiplier shown in
// the design; the other tiles override AW and BW.
module comb_multiplier #(
  parameter int unsigned AW = 19,
  parameter int unsigned BW = 17
) (
  input  logic [AW-1:0]    DataA,
  input  logic [BW-1:0]    DataB,
  output logic [AW+BW-1:0] Result
);

  assign Result = (AW+BW)'(DataA) * (AW+BW)'(DataB);

endmodule
