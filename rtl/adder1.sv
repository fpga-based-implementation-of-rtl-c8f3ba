// adder1 - ripple-carry adder for the two biased exponents.
//
// Adds DataA and DataB bit by bit, each full adder passing its carry to the
// next one, and returns the WIDTH-bit sum in Result. The multiplier feeds it
// the two 11-bit exponents zero-extended to 12 bits, so the 12-bit Result
// holds the full exponent sum (2..4094 for normal operands) and no carry is
// lost. The ripple-carry structure and the port names and 12-bit port width
// follow the exponent adder of the design; the module is purely
// combinational, and the multiplier registers its output in pipeline stage 1.
module adder1 #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] DataA,
  input  logic [WIDTH-1:0] DataB,
  output logic [WIDTH-1:0] Result
);

  logic [WIDTH-1:0] carry;   // carry into each bit; the carry out of the
                             // top bit is dropped (Result has no spare bit)

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign Result[i]  = DataA[i] ^ DataB[i] ^ carry[i];
    if (i < WIDTH - 1) begin : g_c
      assign carry[i+1] = (DataA[i] & DataB[i]) | (carry[i] & (DataA[i] ^ DataB[i]));
    end
  end

endmodule
