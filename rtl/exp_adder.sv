// Exponent adder.
//
// Adds the two biased exponents of a product, Ez = Ex + Ey before the bias is
// taken out. The sum is one bit wider than the inputs so that it never wraps:
// an 11-bit adder gives a 12-bit sum for double precision and an 8-bit adder a
// 9-bit sum for each single-precision lane, the widths of the multiplier's block
// diagram. The adder type is not specified; a plain behavioural add is used.
// Purely combinational.
module exp_adder #(
  parameter int unsigned W = 11            // exponent width
) (
  input  logic [W-1:0] ea,                 // biased exponent of operand 1
  input  logic [W-1:0] eb,                 // biased exponent of operand 2
  output logic [W:0]   sum                 // ea + eb, no overflow possible
);

  always_comb sum = {1'b0, ea} + {1'b0, eb};

endmodule
